// tb_dct2d_top_dual: end-to-end self-checking test of the 2-D DCT with two
// SCDCT pairs (LANES = 2, four SCDCT modules): two pixels enter and two
// coefficients leave per cycle.
//
// Same block sequence and checks as the single-lane test: gapless full
// blocks (the output of each lane must then run without a hole, i.e. two
// coefficients per cycle), gapless 4x4 partial blocks with changing origins,
// and blocks with random input gaps. Every coefficient is compared bit for
// bit with the integer reference and within 1.5 of the real 2-D DCT; lane l
// must carry the columns v = v0 + l, v0 + l + 2, ...; the first coefficient
// of each block must appear 22 cycles after the block's last pixel pair.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_dct2d_top_dual;
  import scdct_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 22;
  localparam int NB  = 40;
  localparam int L   = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              in_valid;
  logic signed [8:0] in_pix [L];
  logic              trunc_en;
  coef_idx_t         sub_u0, sub_v0;
  logic              out_valid [L];
  logic signed [12:0] out_coef [L];
  coef_idx_t         out_u [L], out_v [L];
  logic              out_last [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct2d_top #(.LANES(L)) dut (.*);

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
  exp_t q [L][$];

  int cyc = 0;
  int last_pix_cyc [NB];
  int first_out_seen [NB];
  int n_full = 0, n_trunc = 0, n_b2b = 0, n_gap = 0, n_switch = 0, n_bank1 = 0;
  int run [L], best_run [L];

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
        e.last = (v >= cv + nv - L) && (u == cu + nu - 1);
        e.y = ref_1d(col, u, 14);
        s = 0.0;
        for (int i = 0; i < 8; i++)
          for (int n = 0; n < 8; n++) s += x[i][n] * basis(v, n) * basis(u, i);
        e.yr = s;
        q[(v - cv) % L].push_back(e);
      end
    end
  endtask

  // Scoreboard, one per lane.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < L; l++) begin
        if (out_valid[l]) begin
          exp_t e;
          run[l]++;
          if (run[l] > best_run[l]) best_run[l] = run[l];
          checks++;
          if (q[l].size() == 0) begin
            failures++;
            $display("unexpected output on lane %0d", l);
          end else begin
            e = q[l].pop_front();
            if (longint'(out_coef[l]) != e.y || int'(out_u[l]) != e.u || int'(out_v[l]) != e.v ||
                int'(out_last[l]) != e.last) begin
              failures++;
              if (failures < 10)
                $display("lane %0d blk %0d (u%0d v%0d l%0d) got %0d u%0d v%0d l%0d exp %0d", l,
                         e.blk, e.u, e.v, e.last, out_coef[l], out_u[l], out_v[l], out_last[l], e.y);
            end
            checks++;
            if ((real'(out_coef[l]) - e.yr) > 1.5 || (e.yr - real'(out_coef[l])) > 1.5) failures++;
            if (l == 0 && !first_out_seen[e.blk]) begin
              first_out_seen[e.blk] = 1;
              checks++;
              if (cyc - last_pix_cyc[e.blk] != LAT) begin
                failures++;
                $display("blk %0d latency %0d", e.blk, cyc - last_pix_cyc[e.blk]);
              end
            end
          end
        end else begin
          run[l] = 0;
        end
      end
    end
  end

  initial begin
    bit prev_tr;
    int prev_u0, prev_v0;
    in_valid = 1'b0;
    for (int l = 0; l < L; l++) in_pix[l] = '0;
    for (int l = 0; l < L; l++) begin
      run[l] = 0;
      best_run[l] = 0;
    end
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
      for (int k = 0; k < 64; k += L) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          repeat ($urandom_range(1, 5)) @(negedge clk);
        end
        if (k == 0 && b > 0 && in_valid) n_b2b++;
        in_valid = 1'b1;
        for (int l = 0; l < L; l++) in_pix[l] = 9'(x[(k + l) / 8][(k + l) % 8]);
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
    for (int l = 0; l < L; l++)
      if (q[l].size() != 0) begin
        failures++;
        $display("%0d coefficients missing on lane %0d", q[l].size(), l);
      end
    // Mechanisms that must have happened.
    checks += 7;
    if (n_full == 0)      failures++;
    if (n_trunc == 0)     failures++;
    if (n_b2b == 0)       failures++;
    if (n_gap == 0)       failures++;
    if (n_switch == 0)    failures++;
    if (n_bank1 == 0)     failures++;
    for (int l = 0; l < L; l++)
      if (best_run[l] < 8 * 64 / L) begin
        failures++;
        $display("longest full-rate output run on lane %0d: %0d", l, best_run[l]);
      end
    $display("full=%0d partial=%0d back_to_back=%0d gaps=%0d switches=%0d longest_run=%0d",
             n_full, n_trunc, n_b2b, n_gap, n_switch, best_run[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
