// dsrd_unit: double shift right, one element of a big-integer right shift.
//
// With n = RB[5:0] (bits 58:63 in Power bit numbering), RA is rotated right
// by n (a left rotate by 64-n). The low 64-n bits of the rotated value are
// RA >> n, and the other n bits are the bits shifted out of RA, already in
// the top n bit positions:
//   mask = MASK(n,63)  (Power numbering: ones in the low 64-n bits)
//   RT   = (v & mask) | (RC & ~mask)
//   RS   =  v & ~mask
// Run from the most significant element down, with RS fed back as the next
// element's RC, the chain shifts a whole vector right by n in place. Only a
// 64-bit rotator is needed, not a 128-bit one. n = 0 gives RT = RA, RS = 0.
// Combinational. Only bits 5:0 of RB are used, by definition of the
// operation; its other bits are ignored.
module dsrd_unit
  import bigint_pkg::*;
(
  input  word_t ra,
  input  word_t rb,   // shift amount in bits 5:0
  input  word_t rc,   // bits shifted out of the element above
  output word_t rt,
  output word_t rs
);
  logic [5:0] n;
  word_t v, mask;
  assign n    = rb[5:0];
  assign v    = (ra >> n) | (ra << (7'd64 - {1'b0, n}));   // rotate right by n
  assign mask = {XLEN{1'b1}} >> n;
  assign rt   = (v & mask) | (rc & ~mask);
  assign rs   = v & ~mask;
endmodule
