// Self-checking testbench for reduction_step2.
// Drives 200000 random reduced matrices (positions a column does not use kept
// at 0) and checks that the two output rows add up to the weighted bit count
// of the matrix plus the errors of the ten compressors: Ha in columns 3-7 and
// 10 (-1 when x4 = x3 = 1), Yang2 in columns 8, 9, 11 and 12 (+1 on 1100,
// -1 on 1111). Bit 15 of both rows and bit 0 of the carry row must stay 0.
// Each kind of compressor error must occur at least once.
module tb_reduction_step2;
  import approx_mult_pkg::*;

  mat4_t  m4;
  rows2_t r;
  int checks = 0, failures = 0;

  reduction_step2 dut (.m4(m4), .r(r));

  // Bits used per column
  localparam int USED [NCOL] = '{1, 2, 3, 4, 4, 4, 4, 4, 4, 4, 4, 4, 4, 2, 1};

  function automatic bit is_yang2(int k);
    return k == 8 || k == 9 || k == 11 || k == 12;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected, got;
    int n_ha_err = 0, n_y_plus = 0, n_y_minus = 0;
    for (int n = 0; n < 200000; n++) begin
      for (int k = 0; k < NCOL; k++)
        m4[k] = 4'($urandom) & 4'((1 << USED[k]) - 1);
      #1;
      expected = 0;
      for (int k = 0; k < NCOL; k++) begin
        expected += longint'($countones(m4[k])) << k;
        if (k >= 3 && k <= 12 && m4[k][3:2] == 2'b11) begin
          if (!is_yang2(k)) begin
            expected -= longint'(1) << k;
            n_ha_err++;
          end else if (m4[k][1:0] == 2'b00) begin
            expected += longint'(1) << k;
            n_y_plus++;
          end else if (m4[k][1:0] == 2'b11) begin
            expected -= longint'(1) << k;
            n_y_minus++;
          end
        end
      end
      got = longint'(r.r0) + longint'(r.r1);
      checks++;
      if (got != expected) begin
        failures++;
        if (failures < 10) $display("FAIL m4=%h rows sum %0d expected %0d", m4, got, expected);
      end
      checks++;
      if (r.r0[15] || r.r1[15] || r.r1[0]) begin
        failures++;
        if (failures < 10) $display("FAIL m4=%h constant row bit set", m4);
      end
    end
    $display("compressor errors: Ha -1: %0d, Yang2 +1: %0d, Yang2 -1: %0d", n_ha_err, n_y_plus, n_y_minus);
    checks++;
    if (n_ha_err == 0 || n_y_plus == 0 || n_y_minus == 0) begin
      failures++;
      $display("FAIL a kind of compressor error never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
