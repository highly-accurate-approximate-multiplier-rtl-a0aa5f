// Exact half adder: y = {carry, sum} = a + b. Combinational.
// Used where the reduction scheme needs to take two bits out of a column.
module half_adder
  import approx_mult_pkg::*;
(
  input  logic a,
  input  logic b,
  output cs_t  y
);

  always_comb begin
    y.sum   = a ^ b;
    y.carry = a & b;
  end

endmodule
