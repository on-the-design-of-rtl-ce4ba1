// scdct_rowbuf: input buffer engine of the 2-D DCT (SIPO plus row bank).
//
// Pixels of an 8x8 block arrive serially in row-major order, in beats of
// LANES pixels (at most one beat per cycle; lane 0 is the earlier pixel).
// A scdct_sipo turns every eight of them into a row vector F_i, which
// is written into row i of the bank being filled. The buffer has two banks of
// eight rows (ping-pong): when row 7 of a bank has been written, block_ready
// pulses for one cycle, filling continues in the other bank and, from the
// next cycle on, the completed bank is the read bank. The read port (rd_row -> rd_frame) is combinational and
// lets the first SCDCT pick any row in any cycle, which is what allows it to
// produce the intermediate coefficients column by column, so that no
// transposition memory is needed between the two SCDCTs.
//
// A reader starts the cycle after block_ready and reads for at most
// 64/LANES cycles; the next block_ready comes 64/LANES cycles after the
// previous one at the earliest (one beat per cycle), so the read bank is
// never overwritten or switched while in use. The double bank is this design's choice for gapless input.
//
// in_tag is a per-block side band (the 2-D DCT uses it for the block's mode):
// it is sampled with the first beat of a block and presented on blk_tag from
// the block_ready pulse of that block until the next block_ready.
module scdct_rowbuf
  import scdct_pkg::*;
#(
  parameter int unsigned W     = 9,
  parameter int unsigned LANES = 1,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_data [LANES],
  input  logic [TAG_W-1:0]     in_tag,
  input  coef_idx_t            rd_row,
  output logic signed [W-1:0]  rd_frame [NPT],
  output logic                 block_ready,
  output logic [TAG_W-1:0]     blk_tag
);

  logic signed [W-1:0] row_vec [NPT];
  logic                row_full;

  scdct_sipo #(.W(W), .N(NPT), .LANES(LANES), .TAG_W(1)) u_sipo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_tag   (1'b0),
    .vec      (row_vec),
    .last_tag (),
    .full     (row_full)
  );

  logic signed [W-1:0] bank [2][NPT][NPT];
  coef_idx_t           wr_row;
  logic                fill_bank, rd_bank;

  // Per-block tag, one per bank. pix_bank follows the beat count and runs
  // two cycles ahead of fill_bank, so a block that starts right after the
  // previous one cannot overwrite that block's tag.
  logic [TAG_W-1:0]    tag_bank [2];
  localparam int unsigned BEATS = NPT * NPT / LANES;
  localparam int unsigned BW    = $clog2(BEATS);

  logic [BW-1:0]       pix_cnt;
  logic                pix_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt  <= '0;
      pix_bank <= 1'b0;
    end else if (in_valid) begin
      pix_cnt <= pix_cnt + 1'b1;
      if (pix_cnt == BW'(BEATS - 1)) pix_bank <= ~pix_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && pix_cnt == '0) tag_bank[pix_bank] <= in_tag;
    if (row_full && wr_row == 3'd7)  blk_tag <= tag_bank[fill_bank];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row      <= '0;
      fill_bank   <= 1'b0;
      rd_bank     <= 1'b1;
      block_ready <= 1'b0;
    end else begin
      block_ready <= 1'b0;
      if (row_full) begin
        wr_row <= wr_row + 1'b1;
        if (wr_row == 3'd7) begin
          fill_bank   <= ~fill_bank;
          block_ready <= 1'b1;
        end
      end
      // The read bank changes one cycle after block_ready, when the reader
      // starts on the new block; until then the previous block's last row
      // can still be read.
      if (block_ready) rd_bank <= ~fill_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (row_full) bank[fill_bank][wr_row] <= row_vec;
  end

  assign rd_frame = bank[rd_bank][rd_row];

endmodule
