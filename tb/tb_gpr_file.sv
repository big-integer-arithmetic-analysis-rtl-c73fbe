// tb_gpr_file: self-checking test of gpr_file (8 read, 4 write ports).
// Checks reset to zero, random multi-port writes against a shadow array,
// reads on every port, and that the highest write port wins on a clash.
module tb_gpr_file;
  import bigint_pkg::*;
  localparam int unsigned NRD = 8, NWR = 4;
  logic clk = 0, rst_n = 0;
  ridx_t [NRD-1:0] raddr;
  word_t [NRD-1:0] rdata;
  logic  [NWR-1:0] we;
  ridx_t [NWR-1:0] waddr;
  word_t [NWR-1:0] wdata;
  word_t shadow [NREGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpr_file #(.NRD(NRD), .NWR(NWR)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  task automatic read_all();
    for (int base = 0; base < NREGS; base += NRD) begin
      for (int p = 0; p < NRD; p++) raddr[p] = ridx_t'((base + p * 17) % NREGS);
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL r%0d port %0d: %h exp %h", raddr[p], p, rdata[p], shadow[raddr[p]]);
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < NREGS; r++) shadow[r] = '0;
    #22 rst_n = 1;
    read_all();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w] = 1'($urandom);
        waddr[w] = ridx_t'($urandom % 12);     // small range forces clashes
        wdata[w] = {$urandom, $urandom};
      end
      @(posedge clk); #1;
      for (int w = 0; w < NWR; w++) if (we[w]) shadow[waddr[w]] = wdata[w];
      we = '0;
      for (int p = 0; p < NRD; p++) raddr[p] = ridx_t'(p + (t % 5));
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL t=%0d r%0d", t, raddr[p]);
        end
      end
    end
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w] = 1'b1; waddr[w] = ridx_t'($urandom); wdata[w] = {$urandom, $urandom};
      end
      @(posedge clk); #1;
      for (int w = 0; w < NWR; w++) shadow[waddr[w]] = wdata[w];
      we = '0;
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
