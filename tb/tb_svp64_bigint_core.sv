// tb_svp64_bigint_core: end-to-end, self-checking test of svp64_bigint_core
// at its default parameters (4-lane wide add, Goldschmidt divider).
//
//
// The testbench keeps its own copy of the 128 registers and CA and applies
// every instruction to it one element at a time, in element order, exactly
// as the scalar operations would run. After each instruction all registers
// and CA are compared with the core (read through the host port), and the
// cycle count is compared with the expected timing: one cycle per element,
// one per group of 4 for a fused add, 9 to 11 (Goldschmidt) or 130
// (bit-serial) per divide element, none for VL = 0.
//
// On top of that it runs the big-integer kernels the core is meant for and
// checks them against wide arithmetic: multi-digit add and subtract, a full
// 4x4-digit long multiply (rows of sv.maddedu added with sv.adde), a
// multi-digit right shift by an sv.dsrd chain and a big-integer divide by
// one digit by an sv.divmod2du chain. Finally random instructions with
// random scalar/vector marks, modes and register overlaps are run.
// It counts how often each mechanism happened (fused wide add, element
// add, carry forwarding, divider stall, both RS modes, reverse order,
// VL = 0) and counts a failure for any that never did.
module tb_svp64_bigint_core;
  import bigint_pkg::*;

  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, done;
  sv_instr_t instr;
  logic host_we, host_ca_we, host_ca_wdata, ca;
  ridx_t host_waddr, host_raddr;
  word_t host_wdata, host_rdata;
  logic ev_element, ev_wide_group, ev_chain_fwd, ev_div_stall;

  always #5 clk = ~clk;

  localparam bit DIV_FAST = 1'b1;

  svp64_bigint_core dut (.*);

  word_t model [NREGS];
  logic  model_ca;
  int checks = 0, failures = 0;
  int n_wide = 0, n_fwd = 0, n_stall = 0, n_elem_add = 0;
  int n_rs_rc = 0, n_rs_maxvl = 0, n_reverse = 0, n_vl0 = 0;

  always @(posedge clk) begin
    if (ev_wide_group) n_wide++;
    if (ev_chain_fwd)  n_fwd++;
    if (ev_div_stall)  n_stall++;
    if (ev_element && !ev_wide_group &&
        (dut.ins.op == OP_ADDE || dut.ins.op == OP_SUBFE)) n_elem_add++;
  end

  // ---------------- reference model ----------------
  function automatic ridx_t er(ridx_t base, logic v, int i);
    return v ? ridx_t'(int'(base) + i) : base;
  endfunction

  task automatic model_exec(sv_instr_t in);
    word_t a, b, c, rt, rs;
    logic [127:0] w;
    int e;
    logic [64:0] s;
    for (int k = 0; k < int'(in.vl); k++) begin
      e = in.reverse ? int'(in.vl) - 1 - k : k;
      a = model[er(in.ra, in.ra_v, e)];
      b = model[er(in.rb, in.rb_v, e)];
      c = model[er(in.rc, in.rc_v, e)];
      rs = '0;
      case (in.op)
        OP_ADDE, OP_SUBFE: begin
          s = {1'b0, (in.op == OP_SUBFE) ? ~a : a} + {1'b0, b} + 65'(model_ca);
          rt = s[63:0];
          model_ca = s[64];
        end
        OP_MADDEDU: begin
          w = 128'(a) * 128'(b) + 128'(c);
          rt = w[63:0]; rs = w[127:64];
        end
        OP_DSRD: begin
          // 128-bit funnel form: RT = RA >> n with RC's top n bits, RS = bits shifted out
          w = {a, 64'd0} >> b[5:0];
          rt = w[127:64] | (b[5:0] == 0 ? 64'd0 : (c & ~({64{1'b1}} >> b[5:0])));
          rs = w[63:0];
        end
        default: begin
          if (b == 0) begin rt = '1; rs = '0; end
          else begin
            w = {c, a} / 128'(b); rt = w[63:0];
            w = {c, a} % 128'(b); rs = w[63:0];
          end
        end
      endcase
      model[er(in.rt, in.rt_v, e)] = rt;
      if (in.op != OP_ADDE && in.op != OP_SUBFE) begin
        if (in.rs_mode == RS_IS_RC) model[er(in.rc, in.rc_v, e)] = rs;
        else model[er(ridx_t'(in.rt + ridx_t'(in.maxvl)), in.rt_v, e)] = rs;
      end
    end
  endtask

  // ---------------- host access ----------------
  task automatic wr_reg(int r, word_t v);
    @(negedge clk);
    host_we = 1; host_waddr = ridx_t'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
    model[r] = v;
  endtask

  task automatic set_ca(logic v);
    @(negedge clk);
    host_ca_we = 1; host_ca_wdata = v;
    @(negedge clk);
    host_ca_we = 0;
    model_ca = v;
  endtask

  task automatic compare_all(string what);
    int bad = 0;
    @(negedge clk);
    for (int r = 0; r < NREGS; r++) begin
      host_raddr = ridx_t'(r);
      #0.1;
      if (host_rdata !== model[r]) begin
        if (bad < 4) $display("FAIL %s: r%0d = %h exp %h", what, r, host_rdata, model[r]);
        bad++;
      end
    end
    if (ca !== model_ca) begin
      $display("FAIL %s: CA = %0b exp %0b", what, ca, model_ca);
      bad++;
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  // Fewest and most cycles an instruction may take.
  function automatic int exp_cycles(sv_instr_t in, bit most);
    logic fusable;
    fusable = (in.op == OP_ADDE || in.op == OP_SUBFE) && in.rt_v && in.ra_v && in.rb_v && !in.reverse
           && (in.rt == in.ra || !(touches(in.rt, 1, in.vl, in.ra) || touches(in.ra, 1, in.vl, in.rt)))
           && (in.rt == in.rb || !(touches(in.rt, 1, in.vl, in.rb) || touches(in.rb, 1, in.vl, in.rt)));
    if (in.vl == 0) return 0;
    if (in.op == OP_DIVMOD2DU)
      return (DIV_FAST ? (most ? 11 : 9) : 130) * int'(in.vl);
    if (fusable) return (int'(in.vl) + 3) / 4;
    return int'(in.vl);
  endfunction

  // Issue one instruction, wait for done, check cycles, registers and CA.
  task automatic run(sv_instr_t in, string what);
    int cyc = 0;
    if (in.vl == 0) n_vl0++;
    if (in.reverse) n_reverse++;
    if (in.op != OP_ADDE && in.op != OP_SUBFE) begin
      if (in.rs_mode == RS_IS_RC) n_rs_rc++; else n_rs_maxvl++;
    end
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue_valid = 1; instr = in;
    @(posedge clk); #1;
    issue_valid = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    model_exec(in);
    checks++;
    if (cyc < exp_cycles(in, 0) || cyc > exp_cycles(in, 1)) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d to %0d", what, cyc, exp_cycles(in, 0), exp_cycles(in, 1));
    end
    compare_all(what);
  endtask

  function automatic sv_instr_t mk(sv_op_e op, int rt, int ra, int rb, int rc,
                                   logic [3:0] v, rs_mode_e m, logic rev, int vl, int maxvl);
    sv_instr_t i;
    i.op = op; i.rt = ridx_t'(rt); i.ra = ridx_t'(ra); i.rb = ridx_t'(rb); i.rc = ridx_t'(rc);
    {i.rt_v, i.ra_v, i.rb_v, i.rc_v} = v;
    i.rs_mode = m; i.reverse = rev; i.vl = VL_W'(vl); i.maxvl = VL_W'(maxvl);
    return i;
  endfunction

  function automatic word_t rnd64();
    case ($urandom % 5)
      0: return '1;
      1: return '0;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  // read a big integer of n digits starting at register r
  function automatic logic [1023:0] big_at(int r, int n);
    logic [1023:0] v = '0;
    for (int k = 0; k < n; k++) v[k*64 +: 64] = model[(r + k) % NREGS];
    return v;
  endfunction

  task automatic load_big(int r, int n, logic [1023:0] v);
    for (int k = 0; k < n; k++) wr_reg((r + k) % NREGS, v[k*64 +: 64]);
  endtask

  function automatic logic [1023:0] rnd_big(int n);
    logic [1023:0] v = '0;
    for (int k = 0; k < n; k++) v[k*64 +: 64] = rnd64();
    return v;
  endfunction

  task automatic check_big(string what, logic [1023:0] got, logic [1023:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] A, B, P, U, Q;
    word_t d;
    int n, s;
    issue_valid = 0; instr = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    host_ca_we = 0; host_ca_wdata = 0;
    for (int r = 0; r < NREGS; r++) model[r] = '0;
    model_ca = 0;
    #22 rst_n = 1;
    compare_all("reset");

    // ---- big-integer add and subtract: sv.adde / sv.subfe, vectors at r32, r48 -> r64
    for (int t = 0; t < 6; t++) begin
      n = 1 + $urandom % 16;
      A = rnd_big(n); B = rnd_big(n);
      load_big(32, n, A); load_big(48, n, B);
      set_ca(0);
      run(mk(OP_ADDE, 64, 32, 48, 0, 4'b1110, RS_IS_RC, 0, n, n), "big add");
      check_big("big add", big_at(64, n) | (1024'(model_ca) << (n*64)),
                (A & ((1024'(1) << (n*64)) - 1)) + B);
      set_ca(1);
      run(mk(OP_SUBFE, 64, 48, 32, 0, 4'b1110, RS_IS_RC, 0, n, n), "big sub");
      check_big("big sub", big_at(64, n), (A - B) & ((1024'(1) << (n*64)) - 1));
      checks++;
      if (model_ca !== (A >= B)) begin failures++; $display("FAIL borrow"); end
    end
    // add a scalar digit to every element (element path, no fusion)
    set_ca(0);
    run(mk(OP_ADDE, 80, 32, 5, 0, 4'b1100, RS_IS_RC, 0, 6, 8), "scalar add");
    // in-place add with the destination overlapping a source one element up (not fusable)
    run(mk(OP_ADDE, 33, 32, 48, 0, 4'b1110, RS_IS_RC, 0, 5, 8), "overlapped add");

    // ---- 4x4 long multiply: rows of sv.maddedu (RS=RC, scalar RC carry) + sv.adde
    for (int t = 0; t < 4; t++) begin
      A = rnd_big(4); B = rnd_big(4);
      load_big(8, 4, A);
      for (int k = 0; k < 8; k++) wr_reg(24 + k, '0);          // result
      for (int j = 0; j < 4; j++) begin
        wr_reg(17, B[j*64 +: 64]);                              // digit of B
        wr_reg(16, '0);                                         // zero accumulator
        set_ca(0);
        run(mk(OP_MADDEDU, 0, 8, 17, 16, 4'b1100, RS_IS_RC, 0, 4, 4), "maddedu row");
        wr_reg(4, model[16]);                                   // top digit of the row
        run(mk(OP_ADDE, 24 + j, 24 + j, 0, 0, 4'b1110, RS_IS_RC, 0, 5, 5), "row add");
      end
      check_big("4x4 multiply", big_at(24, 8), (A & ((1024'(1) << 256) - 1)) * (B & ((1024'(1) << 256) - 1)));
    end
    // vector of independent products, high halves to RT+MAXVL
    for (int k = 0; k < 8; k++) begin wr_reg(8 + k, rnd64()); wr_reg(40 + k, rnd64()); wr_reg(56 + k, rnd64()); end
    run(mk(OP_MADDEDU, 96, 8, 40, 56, 4'b1111, RS_IS_RT_MAXVL, 0, 8, 8), "vector maddedu maxvl");
    run(mk(OP_MADDEDU, 96, 8, 40, 56, 4'b1111, RS_IS_RC, 0, 8, 8), "vector maddedu rc");

    // ---- big right shift by an sv.dsrd chain, top digit first
    for (int t = 0; t < 6; t++) begin
      n = 2 + $urandom % 7; s = $urandom % 64;
      U = rnd_big(n);
      load_big(24, n, U);
      wr_reg(1, 64'(s) | ({$urandom, $urandom} & ~64'h3f));   // shift amount in the low 6 bits
      wr_reg(2, '0);
      run(mk(OP_DSRD, 8, 24, 1, 2, 4'b1100, RS_IS_RC, 1, n, n), "dsrd chain");
      check_big("big shift", big_at(8, n), U >> s);
    end

    // ---- big divide by one digit by an sv.divmod2du chain, top digit first
    for (int t = 0; t < 2; t++) begin
      n = DIV_FAST ? 8 : 3;
      U = rnd_big(n);
      d = {$urandom, $urandom} >> ($urandom % 60);
      if (d == 0) d = 7;
      load_big(40, n, U);
      wr_reg(3, d); wr_reg(6, '0);
      run(mk(OP_DIVMOD2DU, 72, 40, 3, 6, 4'b1100, RS_IS_RC, 1, n, n), "divmod chain");
      check_big("big divide", big_at(72, n), (U & ((1024'(1) << (n*64)) - 1)) / 1024'(d));
      check_big("big remainder", 1024'(model[6]), (U & ((1024'(1) << (n*64)) - 1)) % 1024'(d));
    end
    // single scalar 128/64 divide (qhat estimate), remainder to RT+MAXVL
    wr_reg(10, 64'h0123_4567_89ab_cdef); wr_reg(11, 64'h0000_0000_ffff_fff1); wr_reg(12, 64'h0000_0000_1234_5678);
    run(mk(OP_DIVMOD2DU, 13, 10, 11, 12, 4'b0000, RS_IS_RT_MAXVL, 0, 1, 1), "scalar divmod");
    run(mk(OP_ADDE, 13, 10, 11, 12, 4'b1111, RS_IS_RC, 0, 0, 4), "vl zero");

    // ---- random instructions
    for (int t = 0; t < 150; t++) begin
      sv_op_e op;
      int vl, mv;
      for (int k = 0; k < 3; k++) wr_reg($urandom % NREGS, rnd64());
      case ($urandom % 10)
        0, 1, 2: op = OP_ADDE;
        3, 4:    op = OP_SUBFE;
        5, 6:    op = OP_MADDEDU;
        7, 8:    op = OP_DSRD;
        default: op = ($urandom % 4 == 0) ? OP_DIVMOD2DU : OP_MADDEDU;
      endcase
      mv = 1 + $urandom % 12;
      vl = (op == OP_DIVMOD2DU && !DIV_FAST) ? 1 + $urandom % 2 : $urandom % (mv + 1);
      if (vl > mv) mv = vl;
      if ($urandom % 4 == 0) set_ca(1'($urandom));
      run(mk(op, $urandom % NREGS, $urandom % NREGS, $urandom % NREGS,
             ($urandom % 3 == 0) ? $urandom % NREGS : 120 + $urandom % 8,
             4'($urandom), rs_mode_e'($urandom % 2), 1'($urandom % 4 == 0), vl, mv),
          "random");
    end

    $display("mechanisms: wide groups %0d, element adds %0d, forwarded carries %0d, divider stall cycles %0d,",
             n_wide, n_elem_add, n_fwd, n_stall);
    $display("            RS=RC %0d, RS=RT+MAXVL %0d, reverse %0d, VL=0 %0d",
             n_rs_rc, n_rs_maxvl, n_reverse, n_vl0);
    checks++; if (n_wide == 0)     begin failures++; $display("FAIL no fused wide add"); end
    checks++; if (n_elem_add == 0) begin failures++; $display("FAIL no element add"); end
    checks++; if (n_fwd == 0)      begin failures++; $display("FAIL no carry forwarding"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL no divider stall"); end
    checks++; if (n_rs_rc == 0 || n_rs_maxvl == 0) begin failures++; $display("FAIL an RS mode unused"); end
    checks++; if (n_reverse == 0)  begin failures++; $display("FAIL no reverse run"); end
    checks++; if (n_vl0 == 0)      begin failures++; $display("FAIL no VL=0 run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
