// Self-checking testbench for half_adder: all four inputs, {carry,sum} must
// equal a + b.
module tb_half_adder;
  import approx_mult_pkg::*;

  logic a, b;
  cs_t  y;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({y.carry, y.sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b got %b", a, b, {y.carry, y.sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
