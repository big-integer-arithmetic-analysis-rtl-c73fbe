// tb_dsrd_unit: self-checking test of dsrd_unit.
// Expected RT/RS come from a 128-bit funnel shift of RC:RA rather than the
// unit's rotate-and-mask form. Also shifts a 4-digit big integer right by
// chaining RS into RC from the top digit down and checks it against a
// 256-bit shift.
module tb_dsrd_unit;
  import bigint_pkg::*;
  word_t ra, rb, rc, rt, rs;
  int checks = 0, failures = 0;

  dsrd_unit dut (.ra, .rb, .rc, .rt, .rs);

  task automatic check_one(word_t a, int unsigned n, word_t c);
    word_t exp_rt, exp_rs, keep;
    logic [127:0] wide;
    ra = a; rb = {$urandom, $urandom} & ~64'h3f | 64'(n); rc = c;
    #1;
    wide   = {a, 64'd0} >> n;               // bits of RA that stay, then those shifted out
    keep   = (n == 0) ? '0 : ~({64{1'b1}} >> n);
    exp_rt = wide[127:64] | (c & keep);
    exp_rs = wide[63:0];
    checks++;
    if (rt !== exp_rt || rs !== exp_rs) begin
      failures++;
      $display("FAIL a=%h n=%0d c=%h: got %h/%h exp %h/%h", a, n, c, rt, rs, exp_rt, exp_rs);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] big, got;
    word_t carry;
    int unsigned s;
    for (int n = 0; n < 64; n++) check_one({$urandom, $urandom}, n, {$urandom, $urandom});
    check_one('1, 0, '1);
    check_one('1, 63, '1);
    for (int i = 0; i < 1000; i++) check_one({$urandom, $urandom}, $urandom % 64, {$urandom, $urandom});
    for (int t = 0; t < 64; t++) begin
      for (int k = 0; k < 8; k++) big[k*32 +: 32] = $urandom;
      s = t;
      carry = '0;
      for (int k = 3; k >= 0; k--) begin
        ra = big[k*64 +: 64]; rb = 64'(s); rc = carry;
        #1;
        got[k*64 +: 64] = rt;
        carry = rs;
      end
      checks++;
      if (got !== (big >> s)) begin
        failures++;
        $display("FAIL chain shift %0d", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
