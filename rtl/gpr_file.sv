// gpr_file: the scalar general purpose register file that vectors live in.
//
// NREGS 64-bit registers (r0-r127 by default) held in flip-flops, with NRD
// combinational read ports and NWR write ports written on the rising clock
// edge. A vector operand is simply a run of consecutive registers, so a
// fused back end that handles several elements per cycle needs several
// ports; the number of ports is a parameter. If two write ports name the same
// register in one cycle the higher-numbered port wins. Reset clears every
// register to zero.
//
// The 128-register size is the design description's; the port counts,
// reset value and write priority are this design's choices.
module gpr_file
  import bigint_pkg::*;
#(
  parameter int unsigned NRD = 8,
  parameter int unsigned NWR = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ridx_t [NRD-1:0]       raddr,
  output word_t [NRD-1:0]       rdata,
  input  logic  [NWR-1:0]       we,
  input  ridx_t [NWR-1:0]       waddr,
  input  word_t [NWR-1:0]       wdata
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int r = 0; r < NRD; r++) rdata[r] = regs[raddr[r]];
endmodule
