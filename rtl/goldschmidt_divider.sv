// goldschmidt_divider: 128/64-bit unsigned divide with remainder by
// Goldschmidt iteration, a drop-in replacement for divmod2du_serial with the
// same interface and results: RT = low 64 bits of (RC||RA) / RB,
// RS = (RC||RA) % RB, division by zero giving RT = all ones and RS = 0.
//
// How it works. The divisor is normalised by its leading-zero count s, so
// d = (RB << s) / 2^64 lies in [0.5, 1), and the dividend is scaled the same
// way, n = (RC||RA) * 2^s / 2^64, so that n / d is the quotient. A
// 256-entry seed table indexed by the 8 bits below the divisor's leading
// one gives F0 ~ 1/d to about 9 bits. Every iteration then multiplies both
// n and d by the same factor F and forms the next factor F = 2 - d, so d
// converges quadratically to 1 and n to the quotient:
//     n <- n * F,  d <- d * F,  F <- 2 - d
// The two products are independent and use two multipliers in parallel;
// the subtract is the only other arithmetic. The seed and four further
// iterations take the error from about 2^-9 to below the truncation error
// of the FW-bit fractions, so the integer part of n is the quotient or one
// below it. A final step forms the remainder N - q*RB exactly and corrects
// q by one while the remainder is out of [0, RB).
//
// The seed table is computed by a function: entry i = floor(2^21 / (513 +
// 2i)), the reciprocal of the middle of the i-th interval with 11 fraction
// bits.
//
// Timing: start is accepted while not busy; the start edge loads the
// normalised operands and the seed. done rises on the 7th edge after the
// start edge when no correction is needed (5 multiply steps, 1 to take the
// quotient, 1 to check the remainder) and one edge later per correction; rt/rs are valid
// while done is high and held until the next start.
//
// The products keep FW fraction bits; the bits below and the overflow bits
// above are dropped by design, as is all of the remainder above bit 63 once
// it is known to lie in [0, RB).
//
// The use of Goldschmidt iteration with two multipliers and a subtract, for
// a divide in a handful of cycles, is the design description's proposal;
// the seed table, fraction width, iteration count and remainder correction
// are this design's own choices.
module goldschmidt_divider
  import bigint_pkg::*;
#(
  parameter int unsigned FW    = 136,  // fraction bits of n, d and F
  parameter int unsigned NITER = 5     // multiply steps, the seed step included
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t ra,      // dividend low half
  input  word_t rb,      // divisor
  input  word_t rc,      // dividend high half
  output logic  busy,
  output logic  done,
  output word_t rt,      // quotient (low 64 bits)
  output word_t rs       // remainder
);
  localparam int unsigned NW = 129 + FW;  // n: 129 integer bits (room for overshoot)
  localparam int unsigned DW = 2 + FW;    // d and F: values below 4

  typedef logic [NW-1:0] n_t;
  typedef logic [DW-1:0] d_t;

  typedef enum logic [2:0] {G_IDLE, G_ITER, G_REM, G_FIX} gstate_e;

  function automatic logic [11:0] seed(logic [7:0] i);
    return 12'(22'(1 << 21) / (22'd513 + 22'(2 * int'(i))));
  endfunction

  function automatic logic [5:0] lzc64(word_t v);
    logic [5:0] z = 6'd0;
    for (int b = 63; b >= 0; b--) begin
      if (v[b]) break;
      z++;
    end
    return z;
  endfunction

  gstate_e              st;
  logic [127:0]         dvd;
  word_t                dvs;
  n_t                   n;
  d_t                   d, f;
  logic [3:0]           it;
  logic [128:0]         q;
  logic signed [196:0]  r;
  logic                 dz;

  // start-up values
  logic [5:0]  s;
  word_t       dnorm;
  assign s     = lzc64(rb);
  assign dnorm = rb << s;

  // one Goldschmidt step
  logic [NW+DW-1:0] nprod;
  logic [2*DW-1:0]  dprod;
  n_t               n_next;
  d_t               d_next, f_next;
  assign nprod  = n * f;
  assign dprod  = d * f;
  assign n_next = nprod[FW +: NW];
  assign d_next = dprod[FW +: DW];
  assign f_next = d_t'(2) * (d_t'(1) << FW) - d_next;

  // remainder for the current quotient estimate
  logic signed [196:0] r_new;
  assign r_new = $signed({69'd0, dvd}) - $signed({4'd0, 193'(q) * 193'(dvs)});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= G_IDLE;
      busy <= 1'b0;
      done <= 1'b0;
      dvd  <= '0;
      dvs  <= '0;
      n    <= '0;
      d    <= '0;
      f    <= '0;
      it   <= '0;
      q    <= '0;
      r    <= '0;
      dz   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        G_IDLE: if (start) begin
          busy <= 1'b1;
          dvd  <= {rc, ra};
          dvs  <= rb;
          dz   <= (rb == '0);
          n    <= n_t'((n_t'({rc, ra}) << s) << (FW - 64));
          d    <= d_t'(d_t'(dnorm) << (FW - 64));
          f    <= d_t'(d_t'(seed(dnorm[62:55])) << (FW - 11));
          it   <= '0;
          st   <= G_ITER;
        end
        G_ITER: begin
          n  <= n_next;
          d  <= d_next;
          f  <= f_next;
          it <= it + 4'd1;
          if (it == 4'(NITER - 1)) st <= G_REM;
        end
        G_REM: begin
          q  <= n[FW +: 129];
          st <= G_FIX;
        end
        G_FIX: begin
          if (dz || (r_new >= 0 && r_new < $signed({133'd0, dvs}))) begin
            r    <= r_new;
            busy <= 1'b0;
            done <= 1'b1;
            st   <= G_IDLE;
          end else if (r_new < 0) begin
            q <= q - 129'd1;
          end else begin
            q <= q + 129'd1;
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  assign rt = dz ? {XLEN{1'b1}} : q[XLEN-1:0];
  assign rs = dz ? '0 : word_t'(r);
endmodule
