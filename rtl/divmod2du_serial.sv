// divmod2du_serial: 128/64-bit unsigned divide with remainder, one quotient
// bit per cycle.
//
// dividend = RC || RA (RC is the high 64 bits), divisor = RB,
// RT = low 64 bits of dividend / divisor, RS = dividend % divisor.
// Used once, it gives the quotient estimate of long division; chained over
// a vector with RS fed back as the next element's RC (and RC starting at
// zero) it divides a big integer by a single 64-bit digit, the remainder
// acting as a 64-bit carry.
//
// This is the simplest, compare-shift-subtract form: a restoring divider
// that takes 128 cycles per operation. The partial remainder is kept
// below the divisor, so it always fits 64 bits; the remainder is always
// exact. If the quotient does not fit 64 bits (RC >= RB) RT holds its low
// 64 bits and software is expected to test for that case with a compare
// beforehand, as the instruction has no overflow flag. Division by zero
// returns RT = all ones and RS = 0 (this design's choice).
//
// Timing: start is accepted while not busy; done pulses for one cycle
// exactly 128 clock edges after the start edge, with rt/rs valid then and
// held until the next start.
module divmod2du_serial
  import bigint_pkg::*;
(
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
  logic [2*XLEN-1:0] dvd;
  word_t             dvs, rem, quo;
  logic [6:0]        cnt;
  logic              dz;
  logic [XLEN:0]     trial;

  assign trial = {rem, dvd[2*XLEN-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      dvd  <= '0;
      dvs  <= '0;
      rem  <= '0;
      quo  <= '0;
      dz   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        dvd  <= {rc, ra};
        dvs  <= rb;
        rem  <= '0;
        quo  <= '0;
        dz   <= (rb == '0);
      end else if (busy) begin
        dvd <= {dvd[2*XLEN-2:0], 1'b0};
        if (trial >= {1'b0, dvs}) begin
          rem <= word_t'(trial - {1'b0, dvs});
          quo <= {quo[XLEN-2:0], 1'b1};
        end else begin
          rem <= trial[XLEN-1:0];
          quo <= {quo[XLEN-2:0], 1'b0};
        end
        cnt <= cnt + 7'd1;
        if (cnt == 7'd127) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign rt = dz ? {XLEN{1'b1}} : quo;
  assign rs = dz ? '0 : rem;
endmodule
