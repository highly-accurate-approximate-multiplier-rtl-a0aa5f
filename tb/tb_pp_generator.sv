// Self-checking testbench for pp_generator.
// For all 65536 operand pairs: every pp[i][j] must equal a[i] & b[j], and the
// matrix weighted by 2^(i+j) must add up to the exact product a * b.
module tb_pp_generator;
  import approx_mult_pkg::*;

  logic [WIDTH-1:0] a, b;
  pp_t              pp;
  int checks = 0, failures = 0;

  pp_generator dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    int bad;
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia);
        b = 8'(ib);
        #1;
        total = 0;
        bad = 0;
        for (int i = 0; i < WIDTH; i++)
          for (int j = 0; j < WIDTH; j++) begin
            if (pp[i][j] != (a[i] & b[j])) bad++;
            if (pp[i][j]) total += 1 << (i + j);
          end
        checks++;
        if (bad != 0 || total != 32'(ia * ib)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d bad bits=%0d", ia, ib, total, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
