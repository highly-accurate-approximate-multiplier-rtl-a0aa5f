// Self-checking testbench for ha_compressor.
// Applies all 16 inputs and compares {carry,sum} with the published truth
// table of the Ha compressor, written out below row by row (row = x4x3,
// column = x2x1). It also recomputes the average error for partial-product
// inputs (each input 1 with probability 1/4) and expects -16/256.
module tb_ha_compressor;
  import approx_mult_pkg::*;

  logic [3:0] x;
  cs_t        y;
  int checks = 0, failures = 0;

  ha_compressor dut (.x(x), .y(y));

  // Expected value carry*2+sum, index {x4,x3,x2,x1}
  localparam int EXP [16] = '{0, 1, 1, 2,    // x4x3 = 00
                              1, 2, 2, 3,    // 01
                              1, 2, 2, 3,    // 10
                              1, 2, 2, 3};   // 11

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;   // sum of error * 3^(zeros), in units of 1/256
    int val, err, w;
    bias = 0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      val = 2 * int'(y.carry) + int'(y.sum);
      checks++;
      if (val != EXP[i]) begin
        failures++;
        $display("FAIL x=%b got %0d expected %0d", x, val, EXP[i]);
      end
      err = val - $countones(x);
      w = 1;
      for (int k = 0; k < 4 - $countones(x); k++) w *= 3;
      bias += err * w;
    end
    checks++;
    if (bias != -16) begin
      failures++;
      $display("FAIL error bias %0d/256, expected -16/256", bias);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
