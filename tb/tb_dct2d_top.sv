// tb_dct2d_top: end-to-end self-checking test of the 8x8 2-D DCT.
//
// Runs the design at its default sizes through a sequence of blocks:
//   1. gapless full-mode blocks (extreme and random pixels): the two row
//      banks alternate, and the output must be one coefficient per cycle
//      without a hole for the whole run (single-in single-out throughput);
//   2. gapless 4x4 partial-DCT blocks with changing origins (one out of
//      range, clamped to 4), interleaved with full blocks (mode switches);
//   3. blocks whose pixels arrive with random gaps.
// Every coefficient is compared bit for bit with an integer reference built
// from the DCT definition (row pass rounded to 2 fractional bits, column
// pass rounded to an integer) and must lie within 1.5 of the ideal real 2-D
// DCT. The first coefficient of each block must appear 22 cycles after the
// block's last pixel; out_u/out_v/out_last are checked too. Each mechanism
// (full block, partial block, back-to-back block, input gap, mode switch,
// bank alternation, full-rate output run) is counted, and one that never
// happened counts as a failure.
module tb_dct2d_top;
  import scdct_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 22;
  localparam int NB  = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              in_valid;
  logic signed [8:0] in_pix [1];
  logic              trunc_en;
  coef_idx_t         sub_u0, sub_v0;
  logic              out_valid [1];
  logic signed [12:0] out_coef [1];
  coef_idx_t         out_u [1], out_v [1];
  logic              out_last [1];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int     u, v, last, blk;
    longint y;
    real    yr;
  } exp_t;
  exp_t q [$];

  int cyc = 0;
  int last_pix_cyc [NB];
  int first_out_seen [NB];
  int n_full = 0, n_trunc = 0, n_b2b = 0, n_gap = 0, n_switch = 0, n_bank1 = 0;
  int run = 0, best_run = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Expected coefficients of one block, in output order (v outer, u inner).
  task automatic model_block(input longint x [8][8], input int b, input bit tr,
                             input int u0, input int v0);
    longint t [8][8];
    int cu, cv, nu, nv;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) t[i][j] = ref_1d(x[i], j, 10);
    cu = tr ? ((u0 > 4) ? 4 : u0) : 0;
    cv = tr ? ((v0 > 4) ? 4 : v0) : 0;
    nu = tr ? 4 : 8;
    nv = tr ? 4 : 8;
    for (int v = cv; v < cv + nv; v++) begin
      longint col [8];
      for (int i = 0; i < 8; i++) col[i] = t[i][v];
      for (int u = cu; u < cu + nu; u++) begin
        exp_t e;
        real s;
        e.u = u;
        e.v = v;
        e.blk = b;
        e.last = (v == cv + nv - 1) && (u == cu + nu - 1);
        e.y = ref_1d(col, u, 14);
        s = 0.0;
        for (int i = 0; i < 8; i++)
          for (int n = 0; n < 8; n++) s += x[i][n] * basis(v, n) * basis(u, i);
        e.yr = s;
        q.push_back(e);
      end
    end
  endtask

  // Scoreboard.
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid[0]) begin
        exp_t e;
        run++;
        if (run > best_run) best_run = run;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("unexpected output");
        end else begin
          e = q.pop_front();
          if (longint'(out_coef[0]) != e.y || int'(out_u[0]) != e.u || int'(out_v[0]) != e.v ||
              int'(out_last[0]) != e.last) begin
            failures++;
            if (failures < 10)
              $display("blk %0d (u%0d v%0d l%0d) got %0d u%0d v%0d l%0d exp %0d", e.blk, e.u, e.v,
                       e.last, out_coef[0], out_u[0], out_v[0], out_last[0], e.y);
          end
          checks++;
          if ((real'(out_coef[0]) - e.yr) > 1.5 || (e.yr - real'(out_coef[0])) > 1.5) begin
            failures++;
            if (failures < 10) $display("accuracy blk %0d u%0d v%0d: %0d vs %f", e.blk, e.u,
                                        e.v, out_coef[0], e.yr);
          end
          if (!first_out_seen[e.blk]) begin
            first_out_seen[e.blk] = 1;
            checks++;
            if (cyc - last_pix_cyc[e.blk] != LAT) begin
              failures++;
              $display("blk %0d latency %0d", e.blk, cyc - last_pix_cyc[e.blk]);
            end
          end
        end
      end else begin
        run = 0;
      end
    end
  end

  initial begin
    bit prev_tr;
    int prev_u0, prev_v0;
    in_valid = 1'b0;
    in_pix[0] = '0;
    trunc_en = 1'b0;
    sub_u0 = '0;
    sub_v0 = '0;
    prev_tr = 0;
    prev_u0 = 0;
    prev_v0 = 0;
    for (int b = 0; b < NB; b++) first_out_seen[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      longint x [8][8];
      bit tr, gaps;
      int u0, v0;
      gaps = (b >= 30);
      tr = (b >= 8 && b < 30) ? (b % 3 != 2) : (b >= 30 && b % 4 == 1);
      u0 = $urandom_range(0, 4);
      v0 = $urandom_range(0, 4);
      if (b == 9) begin
        u0 = 6;
        v0 = 7;
      end
      if (b == 10) begin
        u0 = 4;
        v0 = 0;
      end
      for (int i = 0; i < 8; i++)
        for (int n = 0; n < 8; n++) begin
          case (b)
            0:       x[i][n] = -256;
            1:       x[i][n] = ((i + n) % 2 == 0) ? 255 : -256;
            2:       x[i][n] = 255;
            3:       x[i][n] = (n < 4) ? -256 : 255;
            default: x[i][n] = longint'($urandom_range(0, 511)) - 256;
          endcase
        end
      model_block(x, b, tr, u0, v0);
      if (tr) n_trunc++; else n_full++;
      if (b > 0 && (tr != prev_tr || (tr && (u0 != prev_u0 || v0 != prev_v0)))) n_switch++;
      if (b % 2 == 1) n_bank1++;
      prev_tr = tr;
      prev_u0 = u0;
      prev_v0 = v0;
      for (int k = 0; k < 64; k++) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          repeat ($urandom_range(1, 5)) @(negedge clk);
        end
        if (k == 0 && b > 0 && in_valid) n_b2b++;
        in_valid = 1'b1;
        in_pix[0] = 9'(x[k / 8][k % 8]);
        trunc_en = (k == 0) ? tr : 1'($urandom);
        sub_u0 = (k == 0) ? 3'(u0) : 3'($urandom);
        sub_v0 = (k == 0) ? 3'(v0) : 3'($urandom);
        last_pix_cyc[b] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (200) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d coefficients missing", q.size());
    end
    // Mechanisms that must have happened.
    checks += 7;
    if (n_full == 0)      failures++;
    if (n_trunc == 0)     failures++;
    if (n_b2b == 0)       failures++;
    if (n_gap == 0)       failures++;
    if (n_switch == 0)    failures++;
    if (n_bank1 == 0)     failures++;
    if (best_run < 8 * 64) begin
      failures++;
      $display("longest full-rate output run %0d", best_run);
    end
    $display("full=%0d partial=%0d back_to_back=%0d gaps=%0d switches=%0d longest_run=%0d",
             n_full, n_trunc, n_b2b, n_gap, n_switch, best_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
