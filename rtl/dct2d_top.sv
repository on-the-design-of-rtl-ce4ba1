// dct2d_top: single-in single-out 8x8 2-D DCT from two SCDCT modules.
//
// Pixels of 8x8 blocks enter one per cycle in row-major order. The row
// buffer (SIPO plus two banks of eight rows) collects a block; the first
// SCDCT then computes the row-DCT coefficients t(i,j) column by column
// (row index i fastest), because the SCDCT can compute any coefficient of
// any row in any cycle. Each column T_j therefore leaves the first SCDCT as
// eight consecutive samples, is gathered by a SIPO, copied into a PIPO, and
// the second SCDCT computes its eight column-DCT coefficients Y(u, j), one
// per cycle. Between the two 1-D stages there is no transposition memory and
// no transposition delay; data flow is one element per cycle in and out.
//
// With trunc_en set with the first pixel of a block, only the 4x4 sub-block
// u = sub_u0..sub_u0+3, v = sub_v0..sub_v0+3 is computed (partial DCT for
// truncation coding): 32 cycles of the first SCDCT and 16 outputs per block.
//
// Ports: in_valid/in_pix (signed PIX_W, gaps allowed, no back-pressure);
// trunc_en/sub_u0/sub_v0 are sampled with the first pixel of each block;
// out_valid/out_coef with its vertical and horizontal frequencies out_u,
// out_v (output order: v outer, u inner) and out_last on the final
// coefficient of a block. The output cannot be stalled.
//
// Arithmetic: Y(u,v) = sum_{n,m} x(n,m) a(u,n) a(v,m) with the orthonormal
// DCT basis, approximated by the 12-fractional-bit factors of the FSCMs. The
// intermediate t keeps T_FRAC fractional bits in T_W bits, rounded half up;
// out_coef is Y rounded to an integer in OUT_W bits (|Y| <= 2048 for 9-bit
// input). Word widths, rounding and the ping-pong row buffer are this
// design's choices; the structure (two SCDCTs, SIPO/PIPO buffer engine,
// column-order computation, 4x4 partial mode) is the SCDCT 2-D architecture.
//
// LANES (default 1) sets how many SCDCT pairs work side by side, the
// area/throughput trade-off of adding SCDCT modules: with LANES = 2 (four
// SCDCTs) pixels enter two per cycle (in_pix[0] is the earlier one), both
// first-pass SCDCTs read the same row and compute columns j and j+1, and
// each lane has its own SIPO, PIPO, sequencer and second SCDCT, so two
// coefficients leave per cycle: lane l gives the columns v = l, l+LANES, ...
// All ports except clk, rst_n, in_valid and the mode inputs are per lane.
//
// Latency: from the pixel that completes a block to its first coefficient,
// 2 (row buffer) + 1 (row sequencer) + 7 (rest of the column) + 5 (SCDCT)
// + 1 (SIPO) + 1 (column sequencer) + 5 (SCDCT) = 22 cycles in full mode,
// counted from the cycle the last pixel is presented to the cycle the first
// coefficient is valid.
module dct2d_top
  import scdct_pkg::*;
#(
  parameter int unsigned PIX_W  = 9,
  parameter int unsigned T_W    = 13,
  parameter int unsigned T_FRAC = 2,
  parameter int unsigned OUT_W  = 13,
  parameter int unsigned LANES  = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [PIX_W-1:0]  in_pix    [LANES],
  input  logic                     trunc_en,
  input  coef_idx_t                sub_u0,
  input  coef_idx_t                sub_v0,
  output logic                     out_valid [LANES],
  output logic signed [OUT_W-1:0]  out_coef  [LANES],
  output coef_idx_t                out_u     [LANES],
  output coef_idx_t                out_v     [LANES],
  output logic                     out_last  [LANES]
);

  // Row buffer engine.
  logic signed [PIX_W-1:0] frame [NPT];
  logic                    block_ready;
  logic                    blk_trunc;
  coef_idx_t               blk_u0, blk_v0;
  coef_idx_t               rs_row, rs_col;
  logic                    rs_valid;
  col_tag_t                rs_tag;

  scdct_rowbuf #(.W(PIX_W), .LANES(LANES), .TAG_W(7)) u_rowbuf (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_data     (in_pix),
    .in_tag      ({trunc_en, sub_u0, sub_v0}),
    .rd_row      (rs_row),
    .rd_frame    (frame),
    .block_ready (block_ready),
    .blk_tag     ({blk_trunc, blk_u0, blk_v0})
  );

  dct2d_row_seq #(.LANES(LANES)) u_row_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (block_ready),
    .trunc_en  (blk_trunc),
    .sub_u0    (blk_u0),
    .sub_v0    (blk_v0),
    .iss_valid (rs_valid),
    .iss_row   (rs_row),
    .iss_col   (rs_col),
    .iss_tag   (rs_tag)
  );

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane

    // First SCDCT: row transform of column rs_col + l, column-ordered output.
    logic                  t_valid;
    logic signed [T_W-1:0] t_data;
    coef_idx_t             t_col;
    col_tag_t              t_tag;

    scdct #(
      .IN_W  (PIX_W),
      .OUT_W (T_W),
      .SHIFT (COEF_FRAC - T_FRAC),
      .TAG_W ($bits(col_tag_t))
    ) u_scdct_row (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (rs_valid),
      .in_f      (frame),
      .in_u      (rs_col + 3'(l)),
      .in_tag    (rs_tag),
      .out_valid (t_valid),
      .out_c     (t_data),
      .out_u     (t_col),
      .out_tag   (t_tag)
    );

    // Column buffer engine: SIPO then PIPO.
    logic signed [T_W-1:0] t_beat   [1];
    logic signed [T_W-1:0] col_vec  [NPT];
    logic signed [T_W-1:0] col_hold [NPT];
    logic                  col_full;
    vec_tag_t              col_vtag;

    assign t_beat[0] = t_data;

    scdct_sipo #(.W(T_W), .N(NPT), .LANES(1), .TAG_W($bits(vec_tag_t))) u_col_sipo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (t_valid),
      .in_data  (t_beat),
      .in_tag   ({t_tag, t_col}),
      .vec      (col_vec),
      .last_tag (col_vtag),
      .full     (col_full)
    );

    scdct_pipo #(.W(T_W), .N(NPT)) u_col_pipo (
      .clk  (clk),
      .load (col_full),
      .d    (col_vec),
      .q    (col_hold)
    );

    logic      cs_valid;
    coef_idx_t cs_u;
    out_tag_t  cs_tag;

    dct2d_col_seq u_col_seq (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (col_full),
      .start_tag (col_vtag),
      .iss_valid (cs_valid),
      .iss_u     (cs_u),
      .iss_tag   (cs_tag)
    );

    // Second SCDCT: column transform.
    out_tag_t o_tag;

    scdct #(
      .IN_W  (T_W),
      .OUT_W (OUT_W),
      .SHIFT (COEF_FRAC + T_FRAC),
      .TAG_W ($bits(out_tag_t))
    ) u_scdct_col (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (cs_valid),
      .in_f      (col_hold),
      .in_u      (cs_u),
      .in_tag    (cs_tag),
      .out_valid (out_valid[l]),
      .out_c     (out_coef[l]),
      .out_u     (out_u[l]),
      .out_tag   (o_tag)
    );

    assign out_v[l]    = o_tag.v;
    assign out_last[l] = o_tag.last;
  end

endmodule
