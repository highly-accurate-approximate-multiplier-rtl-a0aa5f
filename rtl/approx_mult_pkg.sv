// Shared types and sizes of the 8x8 approximate multiplier.
//
// The multiplier reduces an 8x8 partial-product matrix in two steps of
// inexact 4-2 compressors and exact adders, then adds the last two rows with a
// carry-propagate adder. The types below carry the data between those stages:
//   cs_t    - the {carry, sum} pair produced by every adder and compressor
//   pp_t    - the partial-product matrix, pp[i][j] = a[i] & b[j], weight 2^(i+j)
//   mat4_t  - the matrix after step 1: column k holds up to four bits, ordered
//             {x4,x3,x2,x1} exactly as the step-2 element of that column takes them
//   rows2_t - the two rows left after step 2
// The operand width of 8 is the one the design is built for; the reduction
// wiring is specific to it.
package approx_mult_pkg;

  localparam int unsigned WIDTH  = 8;            // operand width
  localparam int unsigned PWIDTH = 2 * WIDTH;    // product width
  localparam int unsigned NCOL   = 2 * WIDTH - 1; // columns of the partial-product matrix

  typedef struct packed {
    logic carry;   // weight 2
    logic sum;     // weight 1
  } cs_t;

  typedef logic [WIDTH-1:0][WIDTH-1:0] pp_t;
  typedef logic [NCOL-1:0][3:0]        mat4_t;

  typedef struct packed {
    logic [PWIDTH-1:0] r1;   // carry row (step-2 carries, already shifted to their column)
    logic [PWIDTH-1:0] r0;   // sum row
  } rows2_t;

endpackage
