// Self-checking testbench for cpa: directed corner cases (long carry chains,
// all ones) and 20000 random row pairs; the result must equal
// (r0 + r1) mod 2^16.
module tb_cpa;
  import approx_mult_pkg::*;

  rows2_t            r;
  logic [PWIDTH-1:0] sum;
  int checks = 0, failures = 0;

  cpa dut (.r(r), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [PWIDTH-1:0] exp_sum;
    #1;
    exp_sum = r.r0 + r.r1;
    checks++;
    if (sum !== exp_sum) begin
      failures++;
      $display("FAIL %h + %h got %h expected %h", r.r0, r.r1, sum, exp_sum);
    end
  endtask

  initial begin
    r.r0 = 16'hFFFF; r.r1 = 16'h0001; check();
    r.r0 = 16'h7FFF; r.r1 = 16'h0001; check();
    r.r0 = 16'hFFFF; r.r1 = 16'hFFFF; check();
    r.r0 = 16'h0000; r.r1 = 16'h0000; check();
    r.r0 = 16'hAAAA; r.r1 = 16'h5555; check();
    for (int n = 0; n < 20000; n++) begin
      r.r0 = 16'($urandom);
      r.r1 = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
