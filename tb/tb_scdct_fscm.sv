// tb_scdct_fscm: self-checking test of the four FSCMs.
// All four columns are instantiated and fed a new random operand and factor
// row every cycle; each product must equal x * F[row][col] * 4096 exactly,
// two cycles later (FSCM_LAT), with F given here as plain integers:
// A1 = 1448; B1, B2 = 1892, 784; C1..C4 = 2008, 1703, 1138, 400.
module tb_scdct_fscm;
  import scdct_pkg::*;

  localparam int W = 14;
  localparam int KF [3][4] = '{
    '{1448, 1448, 1448, 1448},
    '{1892, 1892,  784,  784},
    '{2008, 1703, 1138,  400}
  };

  logic                 clk = 1'b0;
  logic signed [W-1:0]  x;
  fsel_t                sel;
  logic signed [W+11:0] p [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < 4; c++) begin : g_dut
    scdct_fscm #(.W(W), .COL(c)) dut (.clk(clk), .x(x), .sel(sel), .p(p[c]));
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs [$];
  int     ss [$];

  initial begin
    x = '0;
    sel = SEL_A;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        longint xo;
        int so;
        xo = xs.pop_front();
        so = ss.pop_front();
        for (int c = 0; c < 4; c++) begin
          longint e;
          e = xo * KF[so][c];
          checks++;
          if (longint'(p[c]) != e) begin
            failures++;
            if (failures < 10) $display("col=%0d row=%0d x=%0d got %0d exp %0d", c, so, xo, p[c], e);
          end
        end
      end
      if (t == 0)      x = {1'b1, {(W-1){1'b0}}};
      else if (t == 1) x = {1'b0, {(W-1){1'b1}}};
      else             x = W'($urandom);
      sel = fsel_t'($urandom_range(0, 2));
      xs.push_back(longint'(x));
      ss.push_back(int'(sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
