// tb_wide_adde: self-checking test of wide_adde with 4 lanes.
// For every group size 1..4, add and subtract, compares the lanes and the
// final carry with a 256-bit add of the concatenated digits; digits that are
// all ones exercise carry propagation across several lanes.
module tb_wide_adde;
  import bigint_pkg::*;
  localparam int unsigned L = 4;
  logic sub, ca_in, ca_out;
  logic [2:0] nlanes;
  word_t [L-1:0] ra, rb, rt;
  int checks = 0, failures = 0;

  wide_adde #(.LANES(L)) dut (.sub, .ra, .rb, .ca_in, .nlanes, .rt, .ca_out);

  function automatic word_t rnd_digit();
    int unsigned r;
    r = $urandom % 4;
    if (r == 0) return '1;
    if (r == 1) return '0;
    return {$urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [256:0] sum;
    logic [255:0] a, b;
    int unsigned n;
    for (int t = 0; t < 3000; t++) begin
      n = 1 + $urandom % L;
      sub = 1'($urandom); ca_in = 1'($urandom); nlanes = 3'(n);
      for (int l = 0; l < L; l++) begin ra[l] = rnd_digit(); rb[l] = rnd_digit(); end
      #1;
      a = '0; b = '0;
      for (int l = 0; l < L; l++) if (l < n) begin
        a[l*64 +: 64] = sub ? ~ra[l] : ra[l];
        b[l*64 +: 64] = rb[l];
      end
      sum = {1'b0, a} + {1'b0, b} + 257'(ca_in);
      checks++;
      for (int l = 0; l < L; l++)
        if (l < n && rt[l] !== sum[l*64 +: 64]) begin
          failures++;
          $display("FAIL lane %0d", l);
        end
      if (ca_out !== sum[n*64]) begin
        failures++;
        $display("FAIL carry n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
