// wide_adde: wide back-end adder for horizontally fused sv.adde / sv.subfe.
//
// Instead of LANES element additions each passing XER.CA to the next, the
// whole group is added at once: the incoming CA is read once, the carry is
// propagated across the lanes, and only the carry out of the last enabled
// lane is returned as the new CA. Each lane forms its 64-bit sum without a
// carry in, plus a generate bit (the lane overflowed) and a propagate bit
// (the lane sum is all ones, so a carry in would pass straight through).
// The lane carries then follow c[i+1] = g[i] | p[i] & c[i], and each lane
// adds its carry in. The result equals the element-by-element chain.
//
// nlanes (1..LANES) selects how many low lanes take part; ca_out is the carry
// out of lane nlanes-1. sub selects subfe (~RA + RB + CA) for every lane.
// Purely combinational.
//
// The wide-ALU idea and its three duties (read the first CA, propagate,
// store the last CA) follow the design description; the lane width of 64
// bits and the generate/propagate carry scheme are this design's choices.
module wide_adde
  import bigint_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic                         sub,
  input  word_t [LANES-1:0]            ra,
  input  word_t [LANES-1:0]            rb,
  input  logic                         ca_in,
  input  logic [$clog2(LANES+1)-1:0]   nlanes,
  output word_t [LANES-1:0]            rt,
  output logic                         ca_out
);
  always_comb begin
    logic cy;
    cy     = ca_in;
    ca_out = ca_in;
    for (int i = 0; i < LANES; i++) begin
      word_t a_eff, s0;
      logic  g, p;
      a_eff   = sub ? ~ra[i] : ra[i];
      {g, s0} = {1'b0, a_eff} + {1'b0, rb[i]};   // lane sum, generate
      p       = &s0;                             // propagate
      rt[i]   = s0 + word_t'(cy);
      cy      = g | (p & cy);                    // carry into lane i+1
      if (nlanes == ($clog2(LANES+1))'(i + 1)) ca_out = cy;
    end
  end
endmodule
