// Reduction step 1 of the approximate multiplier.
//
// Takes the 8x8 partial-product matrix (up to 8 bits per column) down to at
// most 4 bits per column. Columns 5 and 6 and the upper half of column 7 use
// Ha compressors (negative error bias, placed toward the LSB); the lower half
// of column 7 and columns 8, 9 and 10 use Yang2 compressors (positive bias,
// toward the MSB), so the two biases largely cancel. Exact half adders sit in
// columns 4, 6, 9 and 11 and an exact full adder in column 8.
//
// Input order of every compressor, {x4,x3,x2,x1}, follows the selection rule
// for equally likely inputs: both error-prone inputs x4 and x3 are chosen so
// that, if an error happens, the product it hits has the largest expected
// value (for column 7 that is a7b0 and a4b3). Which partial products go to the
// exact adders, and which pass straight to step 2, is inferred from the
// published step-2 topology (the bits it shows unreduced); as the adders are
// exact, this choice does not change any result.
//
// Output: m4[k] = the bits of column k in the {x4,x3,x2,x1} order in which the
// step-2 element of that column takes them; positions a column does not use
// are 0 (columns 0, 1, 2, 13 and 14 hold 1, 2, 3, 2 and 1 bits, in the low
// positions). Purely combinational.
module reduction_step1
  import approx_mult_pkg::*;
(
  input  pp_t   pp,
  output mat4_t m4
);

  // Naming: <type><column>, type h = half adder, f = full adder,
  // H = Ha compressor, Y = Yang2 compressor.
  cs_t h4, h6, h9, h11;
  cs_t f8;
  cs_t H5, H6, H7;
  cs_t Y7, Y8, Y9, Y10;

  // Exact adders
  half_adder u_h4  (.a(pp[4][0]), .b(pp[3][1]),              .y(h4));
  half_adder u_h6  (.a(pp[2][4]), .b(pp[1][5]),              .y(h6));
  full_adder u_f8  (.a(pp[1][7]), .b(pp[2][6]), .c(pp[3][5]), .y(f8));
  half_adder u_h9  (.a(pp[2][7]), .b(pp[3][6]),              .y(h9));
  half_adder u_h11 (.a(pp[6][5]), .b(pp[7][4]),              .y(h11));

  // Inexact compressors, x = {x4, x3, x2, x1}
  ha_compressor    u_H5  (.x({pp[5][0], pp[2][3], pp[4][1], pp[3][2]}), .y(H5));
  ha_compressor    u_H6  (.x({pp[6][0], pp[3][3], pp[4][2], pp[5][1]}), .y(H6));
  ha_compressor    u_H7  (.x({pp[7][0], pp[4][3], pp[5][2], pp[6][1]}), .y(H7));
  yang2_compressor u_Y7  (.x({pp[0][7], pp[3][4], pp[1][6], pp[2][5]}), .y(Y7));
  yang2_compressor u_Y8  (.x({pp[7][1], pp[4][4], pp[5][3], pp[6][2]}), .y(Y8));
  yang2_compressor u_Y9  (.x({pp[7][2], pp[4][5], pp[5][4], pp[6][3]}), .y(Y9));
  yang2_compressor u_Y10 (.x({pp[7][3], pp[4][6], pp[6][4], pp[5][5]}), .y(Y10));

  // Reduced matrix, each column as {x4, x3, x2, x1} of its step-2 element
  always_comb begin
    m4[0]  = {1'b0, 1'b0, 1'b0, pp[0][0]};
    m4[1]  = {1'b0, 1'b0, pp[0][1], pp[1][0]};
    m4[2]  = {1'b0, pp[0][2], pp[1][1], pp[2][0]};
    m4[3]  = {pp[3][0], pp[0][3], pp[1][2], pp[2][1]};
    m4[4]  = {pp[2][2], pp[0][4], h4.sum,   pp[1][3]};
    m4[5]  = {h4.carry, pp[0][5], H5.sum,   pp[1][4]};
    m4[6]  = {H5.carry, pp[0][6], h6.sum,   H6.sum};
    m4[7]  = {h6.carry, H6.carry, H7.sum,   Y7.sum};
    m4[8]  = {H7.carry, Y7.carry, f8.sum,   Y8.sum};
    m4[9]  = {f8.carry, Y8.carry, Y9.sum,   h9.sum};
    m4[10] = {h9.carry, Y9.carry, pp[3][7], Y10.sum};
    m4[11] = {Y10.carry, pp[4][7], pp[5][6], h11.sum};
    m4[12] = {h11.carry, pp[5][7], pp[6][6], pp[7][5]};
    m4[13] = {1'b0, 1'b0, pp[7][6], pp[6][7]};
    m4[14] = {1'b0, 1'b0, 1'b0, pp[7][7]};
  end

endmodule
