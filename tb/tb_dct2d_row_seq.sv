// tb_dct2d_row_seq: self-checking test of the first-SCDCT sequencer.
// Blocks are started back to back (a start on the last issue of the previous
// block) and with gaps, in full mode and in 4x4 mode with every origin,
// including out-of-range ones that must clamp to 4. The testbench builds the
// expected issue list (column order, row fastest) and compares every cycle.
module tb_dct2d_row_seq;
  import scdct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      start, trunc_en;
  coef_idx_t sub_u0, sub_v0;
  logic      iss_valid;
  coef_idx_t iss_row, iss_col;
  col_tag_t  iss_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct2d_row_seq dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int row, col, trunc, u0, last;
  } exp_t;
  exp_t q [$];
  int nblk_full = 0, nblk_trunc = 0;

  task automatic run_block(input bit tr, input int u0, input int v0, input int gap);
    int cu, cv, n;
    @(negedge clk);
    start = 1'b1;
    trunc_en = tr;
    sub_u0 = 3'(u0);
    sub_v0 = 3'(v0);
    cu = (u0 > 4) ? 4 : u0;
    cv = (v0 > 4) ? 4 : v0;
    n = tr ? 4 : 8;
    for (int j = 0; j < n; j++)
      for (int i = 0; i < 8; i++) begin
        exp_t e;
        e.row = i;
        e.col = tr ? cv + j : j;
        e.trunc = tr;
        e.u0 = tr ? cu : 0;
        e.last = (j == n - 1);
        q.push_back(e);
      end
    if (tr) nblk_trunc++; else nblk_full++;
    // Leave start high for one cycle, then wait until one issue is left.
    @(negedge clk);
    start = 1'b0;
    trunc_en = $urandom_range(0, 1);
    while (q.size() > 1 + 0) @(negedge clk);
    repeat (gap) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (iss_valid) begin
        exp_t e;
        checks++;
        if (q.size() == 0) begin
          failures++;
        end else begin
          e = q.pop_front();
          if (int'(iss_row) != e.row || int'(iss_col) != e.col ||
              int'(iss_tag.trunc) != e.trunc || int'(iss_tag.u0) != e.u0 ||
              int'(iss_tag.last_col) != e.last) begin
            failures++;
            if (failures < 10)
              $display("got r%0d c%0d t%0d u0 %0d l%0d exp r%0d c%0d t%0d u0 %0d l%0d",
                       iss_row, iss_col, iss_tag.trunc, iss_tag.u0, iss_tag.last_col,
                       e.row, e.col, e.trunc, e.u0, e.last);
          end
        end
      end else begin
        checks++;
        if (q.size() != 0 && !start) failures++;
      end
    end
  end

  initial begin
    start = 1'b0;
    trunc_en = 1'b0;
    sub_u0 = '0;
    sub_v0 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_block(0, 0, 0, 0);
    run_block(0, 3, 3, 0);
    run_block(1, 2, 1, 0);
    for (int u0 = 0; u0 < 8; u0++)
      for (int v0 = 0; v0 < 8; v0++) run_block(1, u0, v0, (u0 + v0) % 3);
    run_block(0, 0, 0, 5);
    run_block(0, 1, 1, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0 || nblk_full < 3 || nblk_trunc < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
