// tb_knuth_divide: big-integer long division (Knuth's Algorithm D with
// 64-bit digits) run on svp64_bigint_core at its default parameters.
//
// Each quotient digit takes the three phases of the algorithm:
//   1. estimate qhat from the top two remainder digits with one scalar
//      divmod2du (remainder rhat to RT+MAXVL), unless the top digit already
//      equals the divisor's top digit, where qhat = all ones; then refine
//      qhat with the third digit (scalar compares done by the testbench);
//   2. multiply-subtract: sv.maddedu forms qhat * divisor in a temporary
//      vector (scalar RC carry), sv.subfe subtracts it from the remainder
//      window with CA = 1 on entry;
//   3. if the final CA is 0 (a borrow) qhat was one too large: add the
//      divisor back with sv.adde and decrement qhat.
// The dividend and divisor are normalised (divisor's top bit set) by the
// testbench when loading; the remainder is shifted back by one reverse
// sv.dsrd chain. Quotient and remainder are compared with wide arithmetic.
// Operands are built from digits such as 0, 1, 2^63 and all ones as well
// as random ones, so that the rare qhat-overflow and add-back cases occur;
// the testbench counts both and fails if either never happened.
module tb_knuth_divide;
  import bigint_pkg::*;

  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, done;
  sv_instr_t instr;
  logic host_we, host_ca_we, host_ca_wdata, ca;
  ridx_t host_waddr, host_raddr;
  word_t host_wdata, host_rdata;
  logic ev_element, ev_wide_group, ev_chain_fwd, ev_div_stall;

  always #5 clk = ~clk;

  svp64_bigint_core dut (.*);

  int checks = 0, failures = 0;
  int n_qhat_max = 0, n_refine = 0, n_addback = 0, n_div = 0;

  // register map
  localparam int R_VN  = 0;    // normalised divisor, n digits, then a zero digit
  localparam int R_PR  = 16;   // qhat * divisor, n+1 digits
  localparam int R_UN  = 32;   // normalised dividend / running remainder, m+n+1 digits
  localparam int R_REM = 64;   // un-normalised remainder
  localparam int R_Q   = 100;  // qhat (RT); rhat lands at R_Q + 1 (RT+MAXVL)
  localparam int R_QH  = 104;  // scalar qhat for the multiply
  localparam int R_C   = 105;  // scalar carry register
  localparam int R_S   = 106;  // shift amount

  task automatic wr_reg(int r, word_t v);
    @(negedge clk);
    host_we = 1; host_waddr = ridx_t'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic set_ca(logic v);
    @(negedge clk);
    host_ca_we = 1; host_ca_wdata = v;
    @(negedge clk);
    host_ca_we = 0;
  endtask

  task automatic rd_reg(int r, output word_t v);
    @(negedge clk);
    host_raddr = ridx_t'(r);
    #1 v = host_rdata;
  endtask

  task automatic run(sv_op_e op, int rt, int ra, int rb, int rc, logic [3:0] v,
                     rs_mode_e m, logic rev, int vl, int maxvl);
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue_valid = 1;
    instr.op = op; instr.rt = ridx_t'(rt); instr.ra = ridx_t'(ra); instr.rb = ridx_t'(rb);
    instr.rc = ridx_t'(rc); {instr.rt_v, instr.ra_v, instr.rb_v, instr.rc_v} = v;
    instr.rs_mode = m; instr.reverse = rev; instr.vl = VL_W'(vl); instr.maxvl = VL_W'(maxvl);
    @(posedge clk); #1;
    issue_valid = 0;
    while (!done) begin @(posedge clk); #1; end
  endtask

  function automatic word_t digit();
    case ($urandom % 8)
      0: return '0;
      1: return 64'd1;
      2: return 64'h8000_0000_0000_0000;
      3: return '1;
      4: return 64'h7fff_ffff_ffff_ffff;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  // Divide an (m+n)-digit u by an n-digit v (n >= 2, top digit of v non-zero).
  task automatic divide(int m, int n, logic [1023:0] u, logic [1023:0] v);
    logic [1023:0] un, vn, q, r, exp_q, exp_r;
    logic [127:0] num;
    word_t qhat, rhat, vtop, vnext, ujn, ujn1, ujn2, w;
    int s;
    logic borrow_free;
    // normalise: shift so the divisor's top bit is set
    s = 0;
    while (!v[(n-1)*64 + 63 - s]) s++;
    vn = v << s;
    un = u << s;                                  // m+n+1 digits
    for (int k = 0; k < n; k++) wr_reg(R_VN + k, vn[k*64 +: 64]);
    wr_reg(R_VN + n, '0);
    for (int k = 0; k <= m + n; k++) wr_reg(R_UN + k, un[k*64 +: 64]);
    vtop = vn[(n-1)*64 +: 64];
    vnext = vn[(n-2)*64 +: 64];
    q = '0;
    for (int j = m; j >= 0; j--) begin
      // phase 1: estimate
      rd_reg(R_UN + j + n, ujn);
      rd_reg(R_UN + j + n - 1, ujn1);
      rd_reg(R_UN + j + n - 2, ujn2);
      if (ujn >= vtop) begin
        // the quotient digit would not fit: start from all ones
        n_qhat_max++;
        qhat = '1;
        num  = {ujn, ujn1} - 128'(qhat) * 128'(vtop);
        rhat = num[63:0];
        borrow_free = (num[127:64] == 0);
      end else begin
        run(OP_DIVMOD2DU, R_Q, R_UN + j + n - 1, R_VN + n - 1, R_UN + j + n, 4'b0000,
            RS_IS_RT_MAXVL, 0, 1, 1);
        n_div++;
        rd_reg(R_Q, qhat);
        rd_reg(R_Q + 1, rhat);
        borrow_free = 1;
      end
      // refine with the third digit while rhat still fits one digit
      while (borrow_free && (128'(qhat) * 128'(vnext) > {rhat, ujn2})) begin
        n_refine++;
        qhat--;
        {borrow_free, rhat} = {1'b0, rhat} + {1'b0, vtop};
        borrow_free = !borrow_free;
      end
      // phase 2: multiply and subtract
      wr_reg(R_QH, qhat);
      wr_reg(R_C, '0);
      run(OP_MADDEDU, R_PR, R_VN, R_QH, R_C, 4'b1100, RS_IS_RC, 0, n, n);
      rd_reg(R_C, w);
      wr_reg(R_PR + n, w);
      set_ca(1);
      run(OP_SUBFE, R_UN + j, R_PR, R_UN + j, 0, 4'b1110, RS_IS_RC, 0, n + 1, n + 1);
      // phase 3: add back if it went negative
      if (!ca) begin
        n_addback++;
        qhat--;
        set_ca(0);
        run(OP_ADDE, R_UN + j, R_UN + j, R_VN, 0, 4'b1110, RS_IS_RC, 0, n + 1, n + 1);
      end
      q[j*64 +: 64] = qhat;
    end
    // un-normalise the remainder with one reverse dsrd chain
    wr_reg(R_S, 64'(s));
    wr_reg(R_C, '0);
    run(OP_DSRD, R_REM, R_UN, R_S, R_C, 4'b1100, RS_IS_RC, 1, n, n);
    r = '0;
    for (int k = 0; k < n; k++) begin rd_reg(R_REM + k, w); r[k*64 +: 64] = w; end
    exp_q = u / v;
    exp_r = u % v;
    checks++;
    if (q !== exp_q || r !== exp_r) begin
      failures++;
      $display("FAIL m=%0d n=%0d\n  q %h\n  exp %h\n  r %h\n  exp %h", m, n, q, exp_q, r, exp_r);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] u, v;
    int m, n;
    issue_valid = 0; instr = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    host_ca_we = 0; host_ca_wdata = 0;
    #22 rst_n = 1;
    // a case whose first estimate is one too large even after refinement
    u = 1024'h ffffffffffffffff_0000000000000001_8000000000000000_8000000000000001_8000000000000001;
    v = 1024'h 8000000000000000_0000000000000000_fffffffffffffffe;
    divide(2, 3, u, v);
    // a case where the top remainder digit reaches the divisor's top digit
    u = 1024'h fffffffffffffffe_0000000000000002_8000000000000000;
    v = 1024'h fffffffffffffffe_8000000000000000;
    divide(1, 2, u, v);
    for (int t = 0; t < 300; t++) begin
      n = 2 + $urandom % 5;
      m = $urandom % 6;
      u = '0; v = '0;
      for (int k = 0; k < m + n; k++) u[k*64 +: 64] = digit();
      for (int k = 0; k < n; k++) v[k*64 +: 64] = digit();
      if (v[(n-1)*64 +: 64] == 0) v[(n-1)*64 +: 64] = {$urandom, $urandom} | 64'd1;
      divide(m, n, u, v);
    end
    $display("qhat estimates by divmod2du %0d, qhat set to all ones %0d, refinements %0d, add-backs %0d",
             n_div, n_qhat_max, n_refine, n_addback);
    checks++; if (n_div == 0)      begin failures++; $display("FAIL no divmod2du estimate"); end
    checks++; if (n_qhat_max == 0) begin failures++; $display("FAIL no all-ones qhat"); end
    checks++; if (n_addback == 0)  begin failures++; $display("FAIL no add-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
