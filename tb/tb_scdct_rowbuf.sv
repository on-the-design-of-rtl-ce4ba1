// tb_scdct_rowbuf: self-checking test of the input buffer engine.
// Several 8x8 blocks of random pixels are written row-major, first without
// gaps (so filling of one bank overlaps reading of the other) and then with
// random gaps. block_ready must pulse once per block, two cycles after the
// block's last pixel; during the 64 cycles after that the testbench reads
// all 64 (row, column) pairs in column order, as the first SCDCT does, while
// the next block is already being written, and checks every row vector.
// The per-block tag, given with each block's first pixel, must come out
// with that block's block_ready.
module tb_scdct_rowbuf;
  import scdct_pkg::*;

  localparam int W = 9;
  localparam int NBLK = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                in_valid;
  logic signed [W-1:0] in_data [1];
  logic [5:0]          in_tag;
  logic [5:0]          blk_tag;
  coef_idx_t           rd_row;
  logic signed [W-1:0] rd_frame [NPT];
  logic                block_ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scdct_rowbuf #(.W(W), .LANES(1), .TAG_W(6)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pix [NBLK][64];
  int cyc = 0, last_pix_cyc [NBLK];
  int nready = 0, reads = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Reader: the cycle after each block_ready, sweep the block in column
  // order, one row per cycle, as the first SCDCT's sequencer does.
  task automatic sweep(input int b);
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        rd_row = 3'(i);
        #1;
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (int'(rd_frame[n]) != pix[b][i*8+n]) failures++;
        end
        reads++;
      end
    end
  endtask

  initial rd_row = '0;

  always @(negedge clk) begin
    if (rst_n && block_ready) begin
      int b;
      b = nready;
      nready++;
      checks++;
      if (cyc - last_pix_cyc[b] != 2) begin
        failures++;
        $display("block %0d ready after %0d cycles", b, cyc - last_pix_cyc[b]);
      end
      checks++;
      if (int'(blk_tag) != b + 10) failures++;
      fork
        sweep(b);
      join_none
    end
  end

  initial begin
    in_valid = 1'b0;
    in_data[0] = '0;
    in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        if (b >= NBLK / 2) begin
          in_valid = 1'b0;
          while ($urandom_range(0, 2) == 0) @(negedge clk);
        end
        in_valid = 1'b1;
        in_data[0] = W'($urandom);
        in_tag = (k == 0) ? 6'(b + 10) : 6'($urandom);
        pix[b][k] = int'(in_data[0]);
        last_pix_cyc[b] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (80) @(posedge clk);
    checks++;
    if (nready != NBLK || reads != NBLK * 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
