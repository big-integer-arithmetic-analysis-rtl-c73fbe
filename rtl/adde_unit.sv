// adde_unit: one element of a big-integer add or subtract with 1-bit carry.
//
// adde computes RT = RA + RB + CA and subfe computes RT = ~RA + RB + CA
// (that is RB - RA - 1 + CA); both return the carry out of bit 63 as the new
// CA. Chaining this element operation over a vector, with the carry flowing
// from one element to the next, is a big-integer add or subtract. With
// subfe the carry is an inverted borrow: a final CA of 0 means the result
// went negative. Purely combinational.
//
// The two operations and their carry rules follow the Power ISA adde and
// subfe instructions as the design uses them; the single module with a
// subtract select is this design's choice.
module adde_unit
  import bigint_pkg::*;
(
  input  logic  sub,     // 0: adde, 1: subfe
  input  word_t ra,
  input  word_t rb,
  input  logic  ca_in,
  output word_t rt,
  output logic  ca_out
);
  word_t a_eff;
  assign a_eff = sub ? ~ra : ra;
  assign {ca_out, rt} = {1'b0, a_eff} + {1'b0, rb} + {{XLEN{1'b0}}, ca_in};
endmodule
