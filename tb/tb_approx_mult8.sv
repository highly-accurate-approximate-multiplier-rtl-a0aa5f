// End-to-end testbench for approx_mult8, at its only size (8x8).
//
// Runs all 65536 unsigned operand pairs and measures the error metrics of
// the multiplier against the exact product M:
//   ER     share of pairs with M' != M
//   NMED   mean |M' - M| divided by the largest product 255*255
//   MRED   mean |M' - M| / M, MRERR mean (M' - M) / M   (pairs with M = 0 add 0)
//   PRED   share of pairs with relative error above 2 %, PRED15 above 15 %
// Each must match the published figures for this design to the printed
// precision: ER 35.7 %, NMED 0.0033, MRED 0.90 %, MRERR 0.02 %, PRED 14.4 %,
// PRED15 0.0031 %. Per pair it also checks that a product with an operand of
// at most one set bit is exact (no column then holds two ones), and that no
// relative error exceeds 16 %.
// The mechanisms of the design must all show up: exact products, products
// made too large (Yang2 +1 errors dominating), products made too small
// (Ha and Yang2 -1 errors dominating), and products that are exact although
// some compressor erred (errors cancelling), observed on the compressors'
// inputs inside the design.
module tb_approx_mult8;
  import approx_mult_pkg::*;

  logic [WIDTH-1:0]  a, b;
  logic [PWIDTH-1:0] p;
  int checks = 0, failures = 0;

  approx_mult8 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts the step-1 and step-2 compressors whose x4 and x3 are both 1
  function automatic int erring_compressors();
    int n = 0;
    for (int k = 3; k <= 12; k++)
      if (dut.m4[k][3] && dut.m4[k][2]) n++;
    if (dut.pp[5][0] && dut.pp[2][3]) n++;
    if (dut.pp[6][0] && dut.pp[3][3]) n++;
    if (dut.pp[7][0] && dut.pp[4][3]) n++;
    if (dut.pp[0][7] && dut.pp[3][4]) n++;
    if (dut.pp[7][1] && dut.pp[4][4]) n++;
    if (dut.pp[7][2] && dut.pp[4][5]) n++;
    if (dut.pp[7][3] && dut.pp[4][6]) n++;
    return n;
  endfunction

  function automatic bit near(real got, real paper, real half_ulp);
    return (got >= paper - half_ulp) && (got <= paper + half_ulp);
  endfunction

  task automatic metric(string name, real got, real paper, real half_ulp);
    checks++;
    $display("%-7s %10.5f   (published %0g)", name, got, paper);
    if (!near(got, paper, half_ulp)) begin
      failures++;
      $display("FAIL %s = %f, expected %f +- %f", name, got, paper, half_ulp);
    end
  endtask

  initial begin
    int n_err = 0, n_pred = 0, n_pred15 = 0;
    int n_exact = 0, n_pos = 0, n_neg = 0, n_cancel = 0;
    real sum_ed = 0.0, sum_red = 0.0, sum_rerr = 0.0;
    int m, mp, d;
    real red;
    localparam real TOTAL = 65536.0;

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia);
        b = 8'(ib);
        #1;
        m  = ia * ib;
        mp = int'(p);
        d  = mp - m;
        if (d != 0) n_err++;
        if (d > 0) n_pos++;
        if (d < 0) n_neg++;
        if (d == 0) begin
          n_exact++;
          if (erring_compressors() > 0) n_cancel++;
        end
        sum_ed += (d < 0) ? -real'(d) : real'(d);
        red = 0.0;
        if (m != 0) begin
          red = ((d < 0) ? -real'(d) : real'(d)) / real'(m);
          sum_red  += red;
          sum_rerr += real'(d) / real'(m);
          if (red > 0.02) n_pred++;
          if (red > 0.15) n_pred15++;
        end
        if ($countones(a) <= 1 || $countones(b) <= 1) begin
          checks++;
          if (d != 0) begin
            failures++;
            $display("FAIL %0d * %0d = %0d, expected exact %0d", ia, ib, mp, m);
          end
        end
        checks++;
        if (red > 0.16) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, relative error %f", ia, ib, mp, red);
        end
      end
    end

    metric("ER%",     100.0 * n_err / TOTAL,         35.7,   0.05);
    metric("NMED",    sum_ed / TOTAL / 65025.0,      0.0033, 0.00005);
    metric("MRED%",   100.0 * sum_red / TOTAL,       0.90,   0.005);
    metric("MRERR%",  100.0 * sum_rerr / TOTAL,      0.02,   0.005);
    metric("PRED%",   100.0 * n_pred / TOTAL,        14.4,   0.05);
    metric("PRED15%", 100.0 * n_pred15 / TOTAL,      0.0031, 0.00005);

    $display("products: exact %0d (of which errors cancelled %0d), too large %0d, too small %0d",
             n_exact, n_cancel, n_pos, n_neg);
    checks++;
    if (n_exact == 0 || n_pos == 0 || n_neg == 0 || n_cancel == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
