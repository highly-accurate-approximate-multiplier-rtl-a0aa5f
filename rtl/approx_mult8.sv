// Highly accurate 8x8 unsigned approximate multiplier built from two kinds of
// inexact 4-2 compressors (Ha and Yang2).
//
// The two compressor types err only when their x4 and x3 inputs are both 1,
// but with opposite average sign (Ha -16/256, Yang2 +8/256 for uniformly
// random partial products). Using Ha toward the low columns and Yang2 toward
// the high ones makes the errors of the product largely cancel: over all
// 65536 operand pairs the mean relative error is +0.02 % and the mean
// relative error distance 0.90 %, while 35.7 % of products are inexact.
//
// Data flow, all combinational:
//   pp_generator     64 partial products a[i] & b[j]
//   reduction_step1  to at most 4 bits per column (7 compressors, 5 exact adders)
//   reduction_step2  to 2 rows (10 compressors, 2 half adders)
//   cpa              ripple carry-propagate adder giving the 16-bit product
// Interface: a, b unsigned 8-bit operands; p the approximate product. No
// clock: p settles one combinational delay after a or b changes; pipeline
// registers, if wanted, go around this module. The three-step reduction,
// compressor placement and input order follow the published scheme; the
// ripple final adder and the 16-bit product width are this design's choices.
module approx_mult8
  import approx_mult_pkg::*;
(
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  output logic [PWIDTH-1:0] p
);

  pp_t    pp;
  mat4_t  m4;
  rows2_t rows;

  pp_generator    u_pp    (.a(a), .b(b), .pp(pp));
  reduction_step1 u_step1 (.pp(pp), .m4(m4));
  reduction_step2 u_step2 (.m4(m4), .r(rows));
  cpa             u_cpa   (.r(rows), .sum(p));

endmodule
