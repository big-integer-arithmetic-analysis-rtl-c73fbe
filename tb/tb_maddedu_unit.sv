// tb_maddedu_unit: self-checking test of maddedu_unit.
// The expected 128-bit RA*RB+RC is built from four 32x32 partial products,
// independently of the unit's own expression. Also multiplies a 4-digit
// big integer by one digit by chaining RS into the next RC and checks the
// 320-bit result.
module tb_maddedu_unit;
  import bigint_pkg::*;
  word_t ra, rb, rc, rt, rs;
  int checks = 0, failures = 0;

  maddedu_unit dut (.ra, .rb, .rc, .rt, .rs);

  function automatic logic [127:0] ref_madd(word_t a, word_t b, word_t c);
    logic [127:0] acc;
    acc = 128'(c);
    acc += 128'(a[31:0]  * b[31:0]);
    acc += 128'(a[63:32] * b[31:0]) << 32;
    acc += 128'(a[31:0]  * b[63:32]) << 32;
    acc += 128'(a[63:32] * b[63:32]) << 64;
    return acc;
  endfunction

  task automatic check_one(word_t a, word_t b, word_t c);
    logic [127:0] exp;
    ra = a; rb = b; rc = c;
    #1;
    exp = ref_madd(a, b, c);
    checks++;
    if ({rs, rt} !== exp) begin
      failures++;
      $display("FAIL %h*%h+%h: got %h_%h exp %h", a, b, c, rs, rt, exp);
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
    logic [255:0] big_a;
    logic [319:0] exp_row, got_row;
    word_t digit, carry;
    check_one('1, '1, '1);                   // largest case: no overflow
    check_one(64'd0, '1, '1);
    check_one(64'd3, 64'd5, 64'd7);
    for (int i = 0; i < 2000; i++)
      check_one({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});
    // one row of long multiply
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < 8; k++) big_a[k*32 +: 32] = $urandom;
      digit = {$urandom, $urandom};
      carry = '0;
      for (int k = 0; k < 4; k++) begin
        ra = big_a[k*64 +: 64]; rb = digit; rc = carry;
        #1;
        got_row[k*64 +: 64] = rt;
        carry = rs;
      end
      got_row[319:256] = carry;
      exp_row = 320'(big_a) * 320'(digit);
      checks++;
      if (got_row !== exp_row) begin
        failures++;
        $display("FAIL row: %h", got_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
