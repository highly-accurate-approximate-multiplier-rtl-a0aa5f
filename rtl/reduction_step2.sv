// Reduction step 2 of the approximate multiplier.
//
// Takes the matrix left by step 1 (at most 4 bits per column) down to two
// rows. Columns 3 to 12 each hold one inexact 4-2 compressor whose inputs
// come in {x4,x3,x2,x1} order from step 1: Ha compressors in columns 3-7 and
// 10, Yang2 compressors in columns 8, 9, 11 and 12. Here the inputs no longer
// have equal probabilities of being 1, so x4 and x3 are the two inputs least
// likely to be 1 (mostly carries), which keeps the error-prone x4 = x3 = 1
// case rare. Exact half adders reduce columns 2 and 13; columns 0, 1 and 14
// pass through. Compressor types and input order follow the published step-2
// topology; which two bits of column 2 enter its half adder (x1 and x2 of
// m4[2], i.e. a2b0 and a1b1) is this design's choice and changes no result.
//
// Output: r.r0 holds the sum of each column, r.r1 the carry produced in the
// column below (so bit k of both rows has weight 2^k). Bit 15 of both rows
// and bit 0 of r1 are always 0. Purely combinational.
module reduction_step2
  import approx_mult_pkg::*;
(
  input  mat4_t  m4,
  output rows2_t r
);

  // Columns with a Yang2 compressor; all other compressor columns use Ha.
  localparam logic [NCOL-1:0] YANG2_COLS = (NCOL'(1) << 8) | (NCOL'(1) << 9) |
                                           (NCOL'(1) << 11) | (NCOL'(1) << 12);

  cs_t h2, h13;
  cs_t cmp [3:12];

  half_adder u_h2  (.a(m4[2][0]),  .b(m4[2][1]),  .y(h2));
  half_adder u_h13 (.a(m4[13][0]), .b(m4[13][1]), .y(h13));

  for (genvar k = 3; k <= 12; k++) begin : g_col
    if (YANG2_COLS[k]) begin : g_yang2
      yang2_compressor u_cmp (.x(m4[k]), .y(cmp[k]));
    end else begin : g_ha
      ha_compressor u_cmp (.x(m4[k]), .y(cmp[k]));
    end
  end

  always_comb begin
    r = '0;
    r.r0[0]  = m4[0][0];
    r.r0[1]  = m4[1][0];
    r.r1[1]  = m4[1][1];
    r.r0[2]  = h2.sum;
    r.r1[2]  = m4[2][2];
    r.r1[3]  = h2.carry;
    for (int k = 3; k <= 12; k++) begin
      r.r0[k]   = cmp[k].sum;
      r.r1[k+1] = cmp[k].carry;
    end
    r.r0[13] = h13.sum;
    r.r0[14] = m4[14][0];
    r.r1[14] = h13.carry;
  end

endmodule
