// Self-checking testbench for reduction_step1.
// For all 65536 operand pairs it builds the partial-product matrix, applies
// it, and checks that the reduced matrix, each bit weighted by its column,
// adds up to the exact product plus the errors the seven inexact compressors
// must make on their inputs. The compressor placement and input order below
// are written out independently of the design: Ha compressors lose 1 when
// x4 = x3 = 1; Yang2 compressors gain 1 on x4x3x2x1 = 1100 and lose 1 on
// 1111. It also checks the partial products that pass straight to step 2
// sit in their {x4,x3,x2,x1} positions, that unused positions are 0, and
// that each kind of compressor error happens at least once.
module tb_reduction_step1;
  import approx_mult_pkg::*;

  pp_t   pp;
  mat4_t m4;
  int checks = 0, failures = 0;

  reduction_step1 dut (.pp(pp), .m4(m4));

  // Compressors: column, type (0 = Ha, 1 = Yang2), then i,j of x4, x3, x2, x1
  localparam int NCMP = 7;
  localparam int CMP [NCMP][10] = '{
    '{5,  0, 5,0, 2,3, 4,1, 3,2},
    '{6,  0, 6,0, 3,3, 4,2, 5,1},
    '{7,  0, 7,0, 4,3, 5,2, 6,1},
    '{7,  1, 0,7, 3,4, 1,6, 2,5},
    '{8,  1, 7,1, 4,4, 5,3, 6,2},
    '{9,  1, 7,2, 4,5, 5,4, 6,3},
    '{10, 1, 7,3, 4,6, 6,4, 5,5}};

  // Partial products passed on unreduced: column, position (3 = x4 .. 0 = x1), i, j
  localparam int NPASS = 20;
  localparam int PASS [NPASS][4] = '{
    '{0,0,0,0}, '{1,1,0,1}, '{1,0,1,0}, '{2,2,0,2}, '{2,1,1,1}, '{2,0,2,0},
    '{3,3,3,0}, '{3,2,0,3}, '{3,1,1,2}, '{3,0,2,1},
    '{4,3,2,2}, '{4,2,0,4}, '{4,0,1,3}, '{5,2,0,5}, '{5,0,1,4}, '{6,2,0,6},
    '{10,1,3,7}, '{11,2,4,7}, '{11,1,5,6}, '{14,0,7,7}};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a, b;
    longint expected, got;
    logic [3:0] xin;
    int n_ha_err = 0, n_y_plus = 0, n_y_minus = 0;
    for (a = 0; a < 256; a++) begin
      for (b = 0; b < 256; b++) begin
        for (int i = 0; i < WIDTH; i++)
          for (int j = 0; j < WIDTH; j++)
            pp[i][j] = a[i] & b[j];
        #1;
        expected = longint'(a * b);
        for (int c = 0; c < NCMP; c++) begin
          for (int q = 0; q < 4; q++)
            xin[3-q] = pp[CMP[c][2+2*q]][CMP[c][3+2*q]];
          if (xin[3] && xin[2]) begin
            if (CMP[c][1] == 0) begin
              expected -= longint'(1) << CMP[c][0];
              n_ha_err++;
            end else if (xin[1:0] == 2'b00) begin
              expected += longint'(1) << CMP[c][0];
              n_y_plus++;
            end else if (xin[1:0] == 2'b11) begin
              expected -= longint'(1) << CMP[c][0];
              n_y_minus++;
            end
          end
        end
        got = 0;
        for (int k = 0; k < NCOL; k++)
          got += longint'($countones(m4[k])) << k;
        checks++;
        if (got != expected) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d weighted sum %0d expected %0d", a, b, got, expected);
        end
        checks++;
        if (m4[0][3:1] != 0 || m4[1][3:2] != 0 || m4[2][3] != 0 || m4[13][3:2] != 0 || m4[14][3:1] != 0) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d unused matrix position set", a, b);
        end
        for (int n = 0; n < NPASS; n++) begin
          checks++;
          if (m4[PASS[n][0]][PASS[n][1]] != pp[PASS[n][2]][PASS[n][3]]) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d column %0d position %0d", a, b, PASS[n][0], PASS[n][1]);
          end
        end
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
