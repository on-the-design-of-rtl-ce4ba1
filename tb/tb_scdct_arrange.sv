// tb_scdct_arrange: self-checking test of the SCDCT arrangement stage.
// For every u, random vectors go through the unit and the result is compared
// with the product of the 4x4 permutation matrix P_u (written out here as
// 0/1 matrices) and the input vector.
module tb_scdct_arrange;
  import scdct_pkg::*;

  localparam int W = 10;
  // P_u, row m selects the D_k that FSCM-(m+1) receives.
  localparam bit [3:0] PM [8][4] = '{
    '{4'b1000, 4'b0100, 4'b0010, 4'b0001},
    '{4'b1000, 4'b0100, 4'b0010, 4'b0001},
    '{4'b1000, 4'b0001, 4'b0100, 4'b0010},
    '{4'b0010, 4'b1000, 4'b0001, 4'b0100},
    '{4'b1000, 4'b0100, 4'b0010, 4'b0001},
    '{4'b0100, 4'b0001, 4'b1000, 4'b0010},
    '{4'b0100, 4'b0010, 4'b1000, 4'b0001},
    '{4'b0001, 4'b0010, 4'b0100, 4'b1000}
  };

  logic signed [W-1:0] d  [NHALF];
  logic signed [W-1:0] dp [NHALF];
  coef_idx_t           u;
  int checks = 0, failures = 0;

  scdct_arrange #(.W(W)) dut (.d(d), .u(u), .dp(dp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) d[k] = W'($urandom);
      for (int uu = 0; uu < 8; uu++) begin
        u = 3'(uu);
        #1;
        for (int m = 0; m < 4; m++) begin
          int e;
          e = 0;
          for (int k = 0; k < 4; k++) e += PM[uu][m][3-k] * int'(d[k]);
          checks++;
          if (int'(dp[m]) != e) begin
            failures++;
            if (failures < 10) $display("u=%0d m=%0d got %0d exp %0d", uu, m, dp[m], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
