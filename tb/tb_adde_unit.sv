// tb_adde_unit: self-checking test of adde_unit.
// Drives corner cases and random operands for adde and subfe and compares
// RT and CA with a model that adds the operands in two 32-bit halves.
module tb_adde_unit;
  import bigint_pkg::*;
  logic  sub, ca_in, ca_out;
  word_t ra, rb, rt;
  int checks = 0, failures = 0;

  adde_unit dut (.sub, .ra, .rb, .ca_in, .rt, .ca_out);

  task automatic check_one(logic s, word_t a, word_t b, logic c);
    logic [32:0] lo, hi;
    logic [31:0] a_lo, a_hi;
    word_t exp_rt;
    logic  exp_ca;
    sub = s; ra = a; rb = b; ca_in = c;
    #1;
    a_lo = s ? ~a[31:0]  : a[31:0];
    a_hi = s ? ~a[63:32] : a[63:32];
    lo = {1'b0, a_lo} + {1'b0, b[31:0]} + 33'(c);
    hi = {1'b0, a_hi} + {1'b0, b[63:32]} + 33'(lo[32]);
    exp_rt = {hi[31:0], lo[31:0]};
    exp_ca = hi[32];
    checks++;
    if (rt !== exp_rt || ca_out !== exp_ca) begin
      failures++;
      $display("FAIL sub=%0b a=%h b=%h c=%0b: got %h/%0b exp %h/%0b", s, a, b, c, rt, ca_out, exp_rt, exp_ca);
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
    check_one(0, '1, 64'd0, 1'b1);           // carry ripples all the way
    check_one(0, '1, '1, 1'b1);
    check_one(0, 64'd5, 64'd7, 1'b0);
    check_one(1, 64'd5, 64'd7, 1'b1);        // 7 - 5 = 2, no borrow
    check_one(1, 64'd7, 64'd5, 1'b1);        // 5 - 7 borrows
    check_one(1, 64'd0, 64'd0, 1'b0);        // 0 - 0 - 1
    for (int i = 0; i < 2000; i++)
      check_one(1'($urandom), {$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
