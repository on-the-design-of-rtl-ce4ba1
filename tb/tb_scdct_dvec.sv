// tb_scdct_dvec: self-checking test of the SCDCT add/subtract stage.
// Random 9-bit frames (plus the extreme values) for every u; the expected
// D_k(u) = s_k(u) * (f(k) + (-1)^u f(7-k)) is worked out here with the
// sign exponents p = floor((u+2)/5), q = floor((u+1)/3), r = floor(u/2).
module tb_scdct_dvec;
  import scdct_pkg::*;

  localparam int IN_W = 9;

  logic signed [IN_W-1:0] f [NPT];
  coef_idx_t              u;
  logic signed [IN_W+1:0] d [NHALF];
  int checks = 0, failures = 0;

  scdct_dvec #(.IN_W(IN_W)) dut (.f(f), .u(u), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int n = 0; n < 8; n++) begin
        if (t == 0)      f[n] = -256;
        else if (t == 1) f[n] = (n < 4) ? 255 : -256;
        else             f[n] = IN_W'($urandom);
      end
      for (int uu = 0; uu < 8; uu++) begin
        u = 3'(uu);
        #1;
        for (int k = 0; k < 4; k++) begin
          int e, ex;
          e = (uu % 2 == 0) ? int'(f[k]) + int'(f[7-k]) : int'(f[k]) - int'(f[7-k]);
          ex = (k == 1) ? (uu + 2) / 5 : (k == 2) ? (uu + 1) / 3 : (k == 3) ? uu / 2 : 0;
          if (ex % 2 == 1) e = -e;
          checks++;
          if (int'(d[k]) != e) begin
            failures++;
            if (failures < 10) $display("u=%0d k=%0d got %0d exp %0d", uu, k, d[k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
