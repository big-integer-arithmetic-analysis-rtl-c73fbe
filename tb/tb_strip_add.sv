// tb_strip_add: a big-integer add far larger than the register file, done
// as a strip-mined vector loop on svp64_bigint_core at its defaults.
//
// The two operands (4096 digits of 64 bits each, 262144 bits) live in a
// testbench memory. Each pass of the loop plays the part of the vector
// loads: it copies the next VL = 32 digits of each operand into registers
// r32.. and r64... It then issues one sv.adde *r96, *r32, *r64, and copies
// the 32 result digits back out, which stands in for the vector store. CA
// is cleared once before the first strip. It then carries between strips
// purely through the core's CA flag, as in a Cray-style loop. The sum and
// the final carry are compared with a wide addition. Operands are chosen
// so that carries ripple across strip boundaries. Each strip must take
// 8 cycles: 32 digits, 4 per cycle through the fused wide adder.
module tb_strip_add;
  import bigint_pkg::*;

  localparam int NDIG = 4096;
  localparam int VL   = 32;

  logic clk = 0, rst_n = 0;
  logic issue_valid, issue_ready, done;
  sv_instr_t instr;
  logic host_we, host_ca_we, host_ca_wdata, ca;
  ridx_t host_waddr, host_raddr;
  word_t host_wdata, host_rdata;
  logic ev_element, ev_wide_group, ev_chain_fwd, ev_div_stall;

  always #5 clk = ~clk;

  svp64_bigint_core dut (.*);

  word_t mem_a [NDIG], mem_b [NDIG], mem_r [NDIG];
  int checks = 0, failures = 0, n_cross = 0;

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

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] s;
    logic c;
    int bad = 0, cyc;
    issue_valid = 0; instr = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    host_ca_we = 0; host_ca_wdata = 0;
    for (int k = 0; k < NDIG; k++) begin
      case ($urandom % 4)
        0:       begin mem_a[k] = '1; mem_b[k] = '0; end   // passes a carry on
        1:       begin mem_a[k] = '1; mem_b[k] = 64'd1; end // makes a carry
        default: begin mem_a[k] = {$urandom, $urandom}; mem_b[k] = {$urandom, $urandom}; end
      endcase
    end
    #22 rst_n = 1;
    @(negedge clk);
    host_ca_we = 1; host_ca_wdata = 0;
    @(negedge clk);
    host_ca_we = 0;
    for (int base = 0; base < NDIG; base += VL) begin
      for (int k = 0; k < VL; k++) begin
        wr_reg(32 + k, mem_a[base + k]);
        wr_reg(64 + k, mem_b[base + k]);
      end
      if (ca) n_cross++;
      @(negedge clk);
      issue_valid = 1;
      instr = '0;
      instr.op = OP_ADDE; instr.rt = 7'd96; instr.ra = 7'd32; instr.rb = 7'd64;
      {instr.rt_v, instr.ra_v, instr.rb_v} = 3'b111;
      instr.vl = VL_W'(VL); instr.maxvl = VL_W'(VL);
      @(posedge clk); #1;
      issue_valid = 0;
      cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != VL / 4) begin failures++; $display("FAIL strip took %0d cycles", cyc); end
      for (int k = 0; k < VL; k++) rd_reg(96 + k, mem_r[base + k]);
    end
    // reference: one carry chain over all digits
    c = 0;
    for (int k = 0; k < NDIG; k++) begin
      s = {1'b0, mem_a[k]} + {1'b0, mem_b[k]} + 65'(c);
      c = s[64];
      if (mem_r[k] !== s[63:0]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d wrong digits", bad); end
    checks++;
    if (ca !== c) begin failures++; $display("FAIL final carry"); end
    $display("strips %0d, strips entered with CA set %0d", NDIG / VL, n_cross);
    checks++;
    if (n_cross == 0) begin failures++; $display("FAIL no carry crossed a strip boundary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
