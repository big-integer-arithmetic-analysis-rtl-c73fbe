// maddedu_unit: 64-bit unsigned multiply-add with a 128-bit result split in
// two: product = RA * RB + RC, RT = low 64 bits, RS = high 64 bits.
//
// The sum cannot overflow 128 bits ((2^64-1)^2 + (2^64-1) < 2^128), so no
// carry flag is needed. Chained over a vector with RS fed back as the next
// element's RC, the high half acts as a 64-bit carry and the chain multiplies
// a big integer by one 64-bit digit (one row of schoolbook long multiply).
// Combinational: the core spends one cycle per element on it.
module maddedu_unit
  import bigint_pkg::*;
(
  input  word_t ra,
  input  word_t rb,
  input  word_t rc,
  output word_t rt,
  output word_t rs
);
  logic [2*XLEN-1:0] product;
  assign product = ({{XLEN{1'b0}}, ra} * {{XLEN{1'b0}}, rb}) + {{XLEN{1'b0}}, rc};
  assign rt = product[XLEN-1:0];
  assign rs = product[2*XLEN-1:XLEN];
endmodule
