// tb_divmod2du_serial: self-checking test of divmod2du_serial.
// Checks quotient and remainder against the simulator's 128-bit / and %,
// checks that done arrives exactly 128 cycles after start, covers division
// by zero and quotient overflow, and divides a 4-digit big integer by one
// digit by chaining the remainder into the next RC.
module tb_divmod2du_serial;
  import bigint_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  word_t ra, rb, rc, rt, rs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  divmod2du_serial dut (.clk, .rst_n, .start, .ra, .rb, .rc, .busy, .done, .rt, .rs);

  task automatic run(word_t a, word_t b, word_t c, output word_t q, output word_t r);
    int cyc = 0;
    ra = a; rb = b; rc = c; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 128) begin   // done rises on the 128th edge after the start edge
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    q = rt; r = rs;
  endtask

  task automatic check_one(word_t a, word_t b, word_t c);
    word_t q, r;
    logic [127:0] dvd, eq, er;
    run(a, b, c, q, r);
    dvd = {c, a};
    if (b == 0) begin eq = '1; er = '0; end
    else begin eq = dvd / 128'(b); er = dvd % 128'(b); end
    checks++;
    if (q !== eq[63:0] || r !== er[63:0]) begin
      failures++;
      $display("FAIL %h:%h / %h got %h r %h exp %h r %h", c, a, b, q, r, eq[63:0], er[63:0]);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d, k, q;
    logic [255:0] big, quo;
    ra = '0; rb = '0; rc = '0;
    #22 rst_n = 1;
    @(posedge clk); #1;
    check_one(64'd100, 64'd7, 64'd0);
    check_one('1, '1, 64'hffff_ffff_ffff_fffe);   // largest non-overflowing quotient
    check_one({$urandom, $urandom}, 64'd0, 64'd3); // divide by zero
    check_one({$urandom, $urandom}, 64'd5, 64'd9); // quotient overflow
    for (int i = 0; i < 60; i++) begin
      d = {$urandom, $urandom} >> ($urandom % 64);
      if (d == 0) d = 1;
      check_one({$urandom, $urandom}, d, {$urandom, $urandom} % d);
    end
    for (int t = 0; t < 4; t++) begin
      for (int k2 = 0; k2 < 8; k2++) big[k2*32 +: 32] = $urandom;
      d = {$urandom, $urandom} >> ($urandom % 60);
      if (d == 0) d = 3;
      k = '0;
      for (int j = 3; j >= 0; j--) begin
        run(big[j*64 +: 64], d, k, q, k);
        quo[j*64 +: 64] = q;
      end
      checks++;
      if (quo !== big / 256'(d) || k !== 64'(big % 256'(d))) begin
        failures++;
        $display("FAIL big divide");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
