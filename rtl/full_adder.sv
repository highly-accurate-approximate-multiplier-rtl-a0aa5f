// Exact full adder (3-2 compressor): y = {carry, sum} = a + b + c.
// Combinational. Used in reduction step 1 and as the cell of the step-3
// carry-propagate adder, where c is the incoming carry.
module full_adder
  import approx_mult_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output cs_t  y
);

  always_comb begin
    y.sum   = a ^ b ^ c;
    y.carry = (a & b) | (a & c) | (b & c);
  end

endmodule
