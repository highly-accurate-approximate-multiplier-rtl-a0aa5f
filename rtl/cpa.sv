// Carry-propagate adder, step 3 of the approximate multiplier.
//
// Adds the two rows left by step 2 with a ripple chain of exact full adders,
// bit 0 first; the top bit needs only its sum, so no carry leaves the adder
// (sum modulo 2^PWIDTH).
// For this multiplier the dropped carry is always 0: its largest approximate
// product is 57257. Interface: r = the two rows, sum = r.r0 + r.r1.
// Purely combinational; delay grows linearly with the width. The scheme asks
// only for a carry-propagate adder: the ripple form is this design's choice,
// and any 16-bit adder gives the same product.
module cpa
  import approx_mult_pkg::*;
(
  input  rows2_t            r,
  output logic [PWIDTH-1:0] sum
);

  logic [PWIDTH-1:0] c;      // c[k] = carry into bit k
  cs_t               fa [PWIDTH-1];

  assign c[0] = 1'b0;

  for (genvar k = 0; k < PWIDTH - 1; k++) begin : g_bit
    full_adder u_fa (.a(r.r0[k]), .b(r.r1[k]), .c(c[k]), .y(fa[k]));
    assign sum[k] = fa[k].sum;
    assign c[k+1] = fa[k].carry;
  end

  // Top bit: sum only
  assign sum[PWIDTH-1] = r.r0[PWIDTH-1] ^ r.r1[PWIDTH-1] ^ c[PWIDTH-1];

endmodule
