// svp64_bigint_core: vectorised big-integer execution core.
//
// The core runs one decoded SVP64 big-integer instruction at a time over VL
// elements, giving the same register and CA results as executing the scalar
// element operations one after another in element order (strict program
// order). Vector operands are runs of consecutive registers in the 128 x
// 64-bit register file; a scalar operand names the same register for every
// element. Element i of an operand with base register R is R+i if the operand
// is marked vector, R otherwise; register numbers wrap modulo 128.
//
// Element operations (see bigint_pkg):
//   adde / subfe    1-bit carry chain through XER.CA (big-integer add / sub)
//   maddedu         RT,RS = lo,hi(RA*RB+RC)  (multiply a big integer by a digit)
//   dsrd            RT,RS = double shift right (big-integer right shift)
//   divmod2du       RT,RS = (RC||RA)/RB, (RC||RA)%RB  (divide by a digit)
// The second result RS goes to RC (RS=RC mode) or to RT+MAXVL (RS=RT+MAXVL
// mode). With RC a scalar in RS=RC mode, RC becomes a 64-bit carry that
// loops from one element into the next. With reverse set the elements run
// from VL-1 down to 0, which is the order a right-shift chain needs.
//
// Two fusions shorten the work without changing the results:
//   * Wide add: an sv.adde / sv.subfe whose RT, RA and RB are all vectors
//     (and do not overlap in a way that would make one element read another
//     element's result) is sent LANES elements at a time to wide_adde, which
//     reads CA once, propagates the carry across the group and keeps only the
//     last carry.
//   * Chain forwarding: for a 3-in 2-out operation in RS=RC mode with a scalar
//     RC that no other operand touches, the 64-bit carry passes from one
//     element to the next in an internal register. RC is read from the
//     register file only for the first element and written only by the last,
//     so each element needs two register reads and one write.
//
// Timing: issue_ready is high only when idle. Counting clock edges from the
// one that accepts the instruction to the one that raises done, an
// instruction takes one cycle per element (per LANES elements for a fused
// add). A divmod2du element takes one cycle to start the divider, the
// divider's time, and one to write back: 9 to 11 cycles with the Goldschmidt
// divider (the default), 130 with the bit-serial one. The last results are written on
// the edge that raises done; VL = 0 raises done on the accepting edge and
// changes nothing. The host register and CA ports
// act only while the core is idle. The ev_* outputs pulse once per event and
// are there to observe the mechanisms.
//
// The element operations, the two RS modes, scalar/vector marking, the wide
// add and carry forwarding are the design description's ideas; the decoded
// instruction format, the reverse flag, the overlap rules for fusion, the
// port counts and all timing are this design's choices.
module svp64_bigint_core
  import bigint_pkg::*;
#(
  parameter int unsigned LANES     = 4,   // elements per fused wide add
  parameter bit          FUSE_ADD  = 1'b1,
  parameter bit          CHAIN_FWD = 1'b1,
  parameter bit          DIV_GOLDSCHMIDT = 1'b1  // 0: bit-serial 128-cycle divider
) (
  input  logic      clk,
  input  logic      rst_n,
  // instruction issue
  input  logic      issue_valid,
  output logic      issue_ready,
  input  sv_instr_t instr,
  output logic      done,
  // host access to the registers and CA (while idle)
  input  logic      host_we,
  input  ridx_t     host_waddr,
  input  word_t     host_wdata,
  input  ridx_t     host_raddr,
  output word_t     host_rdata,
  input  logic      host_ca_we,
  input  logic      host_ca_wdata,
  output logic      ca,
  // event pulses
  output logic      ev_element,    // element operations completed this cycle (any)
  output logic      ev_wide_group, // a fused group of LANES adds ran
  output logic      ev_chain_fwd,  // an element took RC from the forwarding register
  output logic      ev_div_stall   // waiting on the divider
);
  localparam int unsigned NL_W = $clog2(LANES + 1);
  localparam int unsigned NRD  = 2 * LANES + 2;
  localparam int unsigned NWR  = LANES + 2;
  localparam int unsigned P_RC   = 2 * LANES;      // read port of RC
  localparam int unsigned P_HOSTR = 2 * LANES + 1; // host read port
  localparam int unsigned P_RS   = LANES;          // write port of RS
  localparam int unsigned P_HOSTW = LANES + 1;     // host write port

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_DIVWAIT} state_e;

  state_e          state;
  sv_instr_t       ins;
  logic [VL_W-1:0] idx;        // steps done so far (elements)
  logic            fuse_q;     // this instruction uses the wide adder
  logic            fwd_q;      // this instruction forwards the RC chain
  word_t           chain_q;    // forwarded carry
  logic            ca_q;

  // ---------------- register file ----------------
  ridx_t [NRD-1:0] raddr;
  word_t [NRD-1:0] rdata;
  logic  [NWR-1:0] we;
  ridx_t [NWR-1:0] waddr;
  word_t [NWR-1:0] wdata;

  gpr_file #(.NRD(NRD), .NWR(NWR)) u_gpr (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata
  );

  // ---------------- current element ----------------
  logic [VL_W-1:0] e;          // element number of this step (lane 0 if fused)
  logic [VL_W-1:0] remain;
  logic [NL_W-1:0] nlanes;
  ridx_t           rc_r, rs_r;
  logic            first_step, last_step, use_chain;
  word_t           op_rc;

  assign remain     = ins.vl - idx;
  assign e          = ins.reverse ? (ins.vl - 8'd1 - idx) : idx;
  assign nlanes     = fuse_q ? ((remain >= VL_W'(LANES)) ? NL_W'(LANES) : NL_W'(remain))
                             : NL_W'(1);
  assign first_step = (idx == '0);
  assign last_step  = (remain <= VL_W'(nlanes));
  assign use_chain  = fwd_q && !first_step;
  assign rc_r       = elem_reg(ins.rc, ins.rc_v, e);
  assign rs_r       = (ins.rs_mode == RS_IS_RC) ? rc_r
                                                : elem_reg(ridx_t'(ins.rt + ridx_t'(ins.maxvl)), ins.rt_v, e);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      raddr[l]         = elem_reg(ins.ra, ins.ra_v, e + VL_W'(l));
      raddr[LANES + l] = elem_reg(ins.rb, ins.rb_v, e + VL_W'(l));
    end
    raddr[P_RC]    = rc_r;
    raddr[P_HOSTR] = host_raddr;
  end
  assign host_rdata = rdata[P_HOSTR];
  assign op_rc      = use_chain ? chain_q : rdata[P_RC];

  // ---------------- execution units ----------------
  word_t add_rt;  logic add_ca;
  word_t mad_rt, mad_rs;
  word_t sh_rt,  sh_rs;
  word_t div_rt, div_rs;
  logic  div_busy, div_done, div_start;
  word_t [LANES-1:0] w_ra, w_rb, w_rt;
  logic  w_ca;

  adde_unit u_adde (
    .sub(ins.op == OP_SUBFE), .ra(rdata[0]), .rb(rdata[LANES]), .ca_in(ca_q),
    .rt(add_rt), .ca_out(add_ca)
  );

  always_comb
    for (int l = 0; l < LANES; l++) begin
      w_ra[l] = rdata[l];
      w_rb[l] = rdata[LANES + l];
    end

  wide_adde #(.LANES(LANES)) u_wide (
    .sub(ins.op == OP_SUBFE), .ra(w_ra), .rb(w_rb), .ca_in(ca_q), .nlanes,
    .rt(w_rt), .ca_out(w_ca)
  );

  maddedu_unit u_mad (
    .ra(rdata[0]), .rb(rdata[LANES]), .rc(op_rc), .rt(mad_rt), .rs(mad_rs)
  );

  dsrd_unit u_dsrd (
    .ra(rdata[0]), .rb(rdata[LANES]), .rc(op_rc), .rt(sh_rt), .rs(sh_rs)
  );

  assign div_start = (state == S_EXEC) && (ins.op == OP_DIVMOD2DU);

  if (DIV_GOLDSCHMIDT) begin : g_div_fast
    goldschmidt_divider u_div (
      .clk, .rst_n, .start(div_start),
      .ra(rdata[0]), .rb(rdata[LANES]), .rc(op_rc),
      .busy(div_busy), .done(div_done), .rt(div_rt), .rs(div_rs)
    );
  end else begin : g_div_serial
    divmod2du_serial u_div (
      .clk, .rst_n, .start(div_start),
      .ra(rdata[0]), .rb(rdata[LANES]), .rc(op_rc),
      .busy(div_busy), .done(div_done), .rt(div_rt), .rs(div_rs)
    );
  end

  // ---------------- issue-time decisions ----------------
  function automatic logic no_cross(ridx_t dst, ridx_t src, logic [VL_W-1:0] vl);
    return (dst == src) || !(touches(dst, 1'b1, vl, src) || touches(src, 1'b1, vl, dst));
  endfunction

  logic can_fuse, can_fwd, is_3in2out;
  assign is_3in2out = (instr.op == OP_MADDEDU) || (instr.op == OP_DSRD) || (instr.op == OP_DIVMOD2DU);
  assign can_fuse = FUSE_ADD && (LANES > 1)
                 && ((instr.op == OP_ADDE) || (instr.op == OP_SUBFE))
                 && instr.rt_v && instr.ra_v && instr.rb_v && !instr.reverse
                 && no_cross(instr.rt, instr.ra, instr.vl)
                 && no_cross(instr.rt, instr.rb, instr.vl);
  assign can_fwd  = CHAIN_FWD && is_3in2out
                 && (instr.rs_mode == RS_IS_RC) && !instr.rc_v
                 && !touches(instr.rt, instr.rt_v, instr.vl, instr.rc)
                 && !touches(instr.ra, instr.ra_v, instr.vl, instr.rc)
                 && !touches(instr.rb, instr.rb_v, instr.vl, instr.rc);

  // ---------------- step result and write-back ----------------
  logic  step_fire;   // this cycle completes the current step
  word_t res_rt, res_rs;
  logic  has_rs;

  always_comb begin
    res_rt = mad_rt;
    res_rs = mad_rs;
    has_rs = 1'b1;
    unique case (ins.op)
      OP_ADDE, OP_SUBFE: begin res_rt = add_rt; res_rs = '0; has_rs = 1'b0; end
      OP_MADDEDU:        begin res_rt = mad_rt; res_rs = mad_rs; end
      OP_DSRD:           begin res_rt = sh_rt;  res_rs = sh_rs;  end
      OP_DIVMOD2DU:      begin res_rt = div_rt; res_rs = div_rs; end
      default:           begin res_rt = mad_rt; res_rs = mad_rs; end
    endcase
  end

  assign step_fire = ((state == S_EXEC) && (ins.op != OP_DIVMOD2DU))
                  || ((state == S_DIVWAIT) && div_done);

  always_comb begin
    we    = '0;
    waddr = '0;
    wdata = '0;
    if (step_fire) begin
      if (fuse_q) begin
        for (int l = 0; l < LANES; l++)
          if (NL_W'(l) < nlanes) begin
            we[l]    = 1'b1;
            waddr[l] = elem_reg(ins.rt, 1'b1, e + VL_W'(l));
            wdata[l] = w_rt[l];
          end
      end else begin
        we[0]    = 1'b1;
        waddr[0] = elem_reg(ins.rt, ins.rt_v, e);
        wdata[0] = res_rt;
        // RS is written after RT, so it wins if both name one register.
        if (has_rs && (!fwd_q || last_step)) begin
          we[P_RS]    = 1'b1;
          waddr[P_RS] = rs_r;
          wdata[P_RS] = res_rs;
        end
      end
    end
    if (state == S_IDLE && host_we) begin
      we[P_HOSTW]    = 1'b1;
      waddr[P_HOSTW] = host_waddr;
      wdata[P_HOSTW] = host_wdata;
    end
  end

  // ---------------- sequencer ----------------
  assign issue_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ins     <= '0;
      idx     <= '0;
      fuse_q  <= 1'b0;
      fwd_q   <= 1'b0;
      chain_q <= '0;
      ca_q    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (host_ca_we) ca_q <= host_ca_wdata;
          if (issue_valid) begin
            ins    <= instr;
            idx    <= '0;
            fuse_q <= can_fuse;
            fwd_q  <= can_fwd;
            if (instr.vl == '0) done  <= 1'b1;
            else                state <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (ins.op == OP_DIVMOD2DU) state <= S_DIVWAIT;
        end
        S_DIVWAIT: ;
        default: state <= S_IDLE;
      endcase
      if (step_fire) begin
        chain_q <= res_rs;
        if (ins.op == OP_ADDE || ins.op == OP_SUBFE)
          ca_q <= fuse_q ? w_ca : add_ca;
        idx <= idx + VL_W'(nlanes);
        if (last_step) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end else begin
          state <= S_EXEC;
        end
      end
    end
  end

  assign ca = ca_q;

  assign ev_element    = step_fire;
  assign ev_wide_group = step_fire && fuse_q && (nlanes > NL_W'(1));
  assign ev_chain_fwd  = step_fire && use_chain;
  assign ev_div_stall  = (state == S_DIVWAIT) && !div_done;

  // ---------------- rules ----------------
  // SVP64 requires VL <= MAXVL.
  a_vl_le_maxvl: assert property (@(posedge clk) disable iff (!rst_n)
    (issue_valid && issue_ready) |-> (instr.vl <= instr.maxvl));
  // The divider is only started when it is free.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);
endmodule
