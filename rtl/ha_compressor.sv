// Inexact 4-2 compressor, "Ha" type.
//
// Counts x1 + x2 + (x3 | x4) into a 2-bit {carry, sum}. Inputs x3 and x4 are
// merged by an OR, so the count is exact unless x4 = x3 = 1, where it is one
// too small (error -1 on the four input patterns 11xx). This is the
// truth table of the Ha compressor; the carry is one AO22 cell:
//   carry = (x1 & x2) | ((x1 ^ x2) & (x3 | x4))
//   sum   = x1 ^ x2 ^ (x3 | x4)
// There is no carry in or carry out, unlike an exact 4-2 compressor.
//
// Interface: x = {x4, x3, x2, x1}; y = {carry, sum}. Purely combinational.
// Because all errors need x4 = x3 = 1, the multiplier feeds the two inputs
// least likely to be 1 into x4 and x3.
module ha_compressor
  import approx_mult_pkg::*;
(
  input  logic [3:0] x,
  output cs_t        y
);

  logic x12_xor;
  logic x34_or;

  always_comb begin
    x12_xor = x[0] ^ x[1];
    x34_or  = x[2] | x[3];
    y.sum   = x12_xor ^ x34_or;
    y.carry = (x[0] & x[1]) | (x12_xor & x34_or);
  end

endmodule
