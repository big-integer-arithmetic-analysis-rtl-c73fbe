// tb_svp64_bigint_core_serial: self-checking test of svp64_bigint_core built
// with the bit-serial divider (DIV_GOLDSCHMIDT = 0) instead of the default
// Goldschmidt one.
//
// Runs scalar 128/64 divides (remainder to RT+MAXVL) and reversed
// sv.divmod2du chains that divide a big integer by one digit with the
// remainder forwarded from element to element. Quotient digits and the
// remainder are compared with wide arithmetic, and every instruction must
// take exactly 130 cycles per element (one to start the divider, 128 in
// it, one to write back). Fails if no forwarded carry or no divider stall
// was seen.
module tb_svp64_bigint_core_serial;
  import bigint_pkg::*;

  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, done;
  sv_instr_t instr;
  logic host_we, host_ca_we, host_ca_wdata, ca;
  ridx_t host_waddr, host_raddr;
  word_t host_wdata, host_rdata;
  logic ev_element, ev_wide_group, ev_chain_fwd, ev_div_stall;
  int checks = 0, failures = 0, n_fwd = 0, n_stall = 0;

  always #5 clk = ~clk;

  svp64_bigint_core #(.DIV_GOLDSCHMIDT(1'b0)) dut (.*);

  always @(posedge clk) begin
    if (ev_chain_fwd) n_fwd++;
    if (ev_div_stall) n_stall++;
  end

  task automatic wr_reg(int r, word_t v);
    @(negedge clk);
    host_we = 1; host_waddr = ridx_t'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic rd_reg(int r, output word_t v);
    @(negedge clk);
    host_raddr = ridx_t'(r);
    #1 v = host_rdata;
  endtask

  // Issue one divmod2du and check its cycle count.
  task automatic run_div(int rt, int ra, int rb, int rc, logic [3:0] v, rs_mode_e m,
                         logic rev, int vl);
    int cyc = 0;
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue_valid = 1;
    instr.op = OP_DIVMOD2DU; instr.rt = ridx_t'(rt); instr.ra = ridx_t'(ra);
    instr.rb = ridx_t'(rb); instr.rc = ridx_t'(rc); {instr.rt_v, instr.ra_v, instr.rb_v, instr.rc_v} = v;
    instr.rs_mode = m; instr.reverse = rev; instr.vl = VL_W'(vl); instr.maxvl = VL_W'(vl);
    @(posedge clk); #1;
    issue_valid = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 130 * vl) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", cyc, 130 * vl);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] u, q;
    logic [127:0] num;
    word_t d, hi, lo, got_q, got_r;
    issue_valid = 0; instr = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    host_ca_we = 0; host_ca_wdata = 0;
    #22 rst_n = 1;
    // scalar 128/64 divides, remainder to RT+MAXVL
    for (int t = 0; t < 4; t++) begin
      d  = {$urandom, $urandom} >> ($urandom % 63);
      if (d == 0) d = 5;
      hi = {$urandom, $urandom} % d;
      lo = {$urandom, $urandom};
      wr_reg(10, lo); wr_reg(11, d); wr_reg(12, hi);
      run_div(20, 10, 11, 12, 4'b0000, RS_IS_RT_MAXVL, 1'b0, 1);
      rd_reg(20, got_q); rd_reg(21, got_r);
      num = {hi, lo};
      checks++;
      if (got_q !== word_t'(num / 128'(d)) || got_r !== word_t'(num % 128'(d))) begin
        failures++;
        $display("FAIL scalar divide %h / %h", num, d);
      end
    end
    // big integer / one digit, remainder chained
    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < 8; k++) u[k*32 +: 32] = $urandom;
      d = {$urandom, $urandom} >> ($urandom % 60);
      if (d == 0) d = 3;
      for (int k = 0; k < 4; k++) wr_reg(40 + k, u[k*64 +: 64]);
      wr_reg(3, d); wr_reg(6, '0);
      run_div(72, 40, 3, 6, 4'b1100, RS_IS_RC, 1'b1, 4);
      for (int k = 0; k < 4; k++) begin rd_reg(72 + k, got_q); q[k*64 +: 64] = got_q; end
      rd_reg(6, got_r);
      checks++;
      if (q !== u / 256'(d) || got_r !== word_t'(u % 256'(d))) begin
        failures++;
        $display("FAIL big divide");
      end
    end
    $display("forwarded carries %0d, divider stall cycles %0d", n_fwd, n_stall);
    checks++; if (n_fwd == 0)   begin failures++; $display("FAIL no carry forwarding"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no divider stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
