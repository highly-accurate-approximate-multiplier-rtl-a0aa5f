// Partial-product generator of the 8x8 unsigned multiplier.
//
// Forms pp[i][j] = a[i] & b[j], the 64 dots of the partial-product matrix;
// pp[i][j] has weight 2^(i+j), so column k of the matrix holds every pp[i][j]
// with i + j = k (one bit in columns 0 and 14, eight in column 7).
// Interface: a, b unsigned operands; pp as typed in approx_mult_pkg.
// Purely combinational: one AND gate per partial product.
module pp_generator
  import approx_mult_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output pp_t              pp
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      for (int j = 0; j < WIDTH; j++) begin
        pp[i][j] = a[i] & b[j];
      end
    end
  end

endmodule
