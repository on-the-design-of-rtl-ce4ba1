// tb_dct2d_col_seq: self-checking test of the second-SCDCT sequencer.
// Columns are started every eight cycles (start on the last issue of the
// previous column), every four cycles in 4x4 mode, and with gaps. Each issue
// must carry the expected u, the column index v and the block-last flag.
module tb_dct2d_col_seq;
  import scdct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      start;
  vec_tag_t  start_tag;
  logic      iss_valid;
  coef_idx_t iss_u;
  out_tag_t  iss_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct2d_col_seq dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int u, v, last;
  } exp_t;
  exp_t q [$];
  int ncol_trunc = 0, ncol_full = 0;

  task automatic run_col(input bit tr, input int u0, input int v, input bit lastc, input int gap);
    int n;
    @(negedge clk);
    start = 1'b1;
    start_tag.ct.trunc = tr;
    start_tag.ct.u0 = 3'(u0);
    start_tag.ct.last_col = lastc;
    start_tag.v = 3'(v);
    n = tr ? 4 : 8;
    for (int k = 0; k < n; k++) begin
      exp_t e;
      e.u = tr ? u0 + k : k;
      e.v = v;
      e.last = lastc && (k == n - 1);
      q.push_back(e);
    end
    if (tr) ncol_trunc++; else ncol_full++;
    @(negedge clk);
    start = 1'b0;
    start_tag = vec_tag_t'($urandom);
    while (q.size() > 1) @(negedge clk);
    repeat (gap) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (iss_valid) begin
        exp_t e;
        if (q.size() == 0) failures++;
        else begin
          e = q.pop_front();
          if (int'(iss_u) != e.u || int'(iss_tag.v) != e.v || int'(iss_tag.last) != e.last) begin
            failures++;
            if (failures < 10) $display("got u%0d v%0d l%0d exp u%0d v%0d l%0d",
                                        iss_u, iss_tag.v, iss_tag.last, e.u, e.v, e.last);
          end
        end
      end else if (q.size() != 0 && !start) failures++;
    end
  end

  initial begin
    start = 1'b0;
    start_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 8; v++) run_col(0, 0, v, v == 7, 0);
    for (int u0 = 0; u0 <= 4; u0++)
      for (int v = 0; v < 4; v++) run_col(1, u0, v + 2, v == 3, (u0 == 2) ? 3 : 0);
    for (int v = 0; v < 8; v++) run_col(0, 0, v, v == 7, v % 2);
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0 || ncol_full != 16 || ncol_trunc != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
