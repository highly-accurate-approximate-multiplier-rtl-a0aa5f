// Self-checking testbench for full_adder: all eight inputs, {carry,sum} must
// equal a + b + c.
module tb_full_adder;
  import approx_mult_pkg::*;

  logic a, b, c;
  cs_t  y;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({y.carry, y.sum} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b got %b", a, b, c, {y.carry, y.sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
