// Inexact 4-2 compressor, "Yang2" type.
//
// Exact count x1 + x2 + x3 + x4 for every input with x4 x3 != 11. When
// x4 = x3 = 1 both outputs are forced to 1 (value 3): that is +1 too large for
// x2 x1 = 00, exact for 01 and 10, and -1 too small for 11. With uniformly
// random partial products its error bias is positive (+8/256), the opposite
// sign of the Ha compressor, which is what the multiplier exploits.
//   carry = (x1 & x2) | ((x1 ^ x2) & (x3 | x4)) | (x3 & x4)   (one AO222 cell)
//   sum   = (x1 ^ x2 ^ (x3 | x4)) | (x3 & x4)
//
// Interface: x = {x4, x3, x2, x1}; y = {carry, sum}. Purely combinational.
module yang2_compressor
  import approx_mult_pkg::*;
(
  input  logic [3:0] x,
  output cs_t        y
);

  logic x12_xor;
  logic x34_or;
  logic x34_and;

  always_comb begin
    x12_xor = x[0] ^ x[1];
    x34_or  = x[2] | x[3];
    x34_and = x[2] & x[3];
    y.sum   = (x12_xor ^ x34_or) | x34_and;
    y.carry = (x[0] & x[1]) | (x12_xor & x34_or) | x34_and;
  end

endmodule
