// dct2d_row_seq: controller of the first SCDCT in the 2-D DCT.
//
// When a block is complete in the row buffer (start), it walks the block in
// column order: for each horizontal frequency j it issues rows i = 0..7 of
// the block together with coefficient index j, one per cycle. The first
// SCDCT therefore emits t(0,j), t(1,j), ..., t(7,j): the column vector T_j of
// the intermediate coefficients arrives serially and can go straight into the
// second SCDCT, with no transposition buffer.
//
// Modes, sampled at start and held for the block: trunc_en = 0 walks all
// eight j (64 cycles); trunc_en = 1 computes only the 4x4 sub-block with
// origin (sub_u0, sub_v0) and walks j = sub_v0..sub_v0+3 (32 cycles).
// Origins above 4 are clamped to 4. Every issue carries a col_tag_t with the
// block's mode and a flag on its last column.
//
// With LANES first-pass SCDCTs working side by side (the area/throughput
// trade-off of using more SCDCT modules), iss_col is the column of lane 0
// and lane l computes column iss_col + l of the same row, so all lanes share
// one row read; the walk then takes 64/LANES (or 32/LANES) cycles. LANES
// must divide 4.
//
// Timing: issues start the cycle after start; outputs are registers. A new
// start while busy is a protocol error (asserted); the row buffer cannot
// produce one as long as input arrives at most one pixel per cycle.
module dct2d_row_seq
  import scdct_pkg::*;
#(
  parameter int unsigned LANES = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      trunc_en,
  input  coef_idx_t sub_u0,
  input  coef_idx_t sub_v0,
  output logic      iss_valid,
  output coef_idx_t iss_row,
  output coef_idx_t iss_col,
  output col_tag_t  iss_tag
);

  coef_idx_t last_col;   // lane-0 column of the last step
  logic      trunc_q;
  coef_idx_t u0_q;

  function automatic coef_idx_t clamp4(input coef_idx_t x);
    return (x > 3'd4) ? 3'd4 : x;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid <= 1'b0;
      iss_row   <= '0;
      iss_col   <= '0;
      last_col  <= '0;
      trunc_q   <= 1'b0;
      u0_q      <= '0;
    end else if (start) begin
      iss_valid <= 1'b1;
      iss_row   <= '0;
      trunc_q   <= trunc_en;
      u0_q      <= trunc_en ? clamp4(sub_u0) : 3'd0;
      iss_col   <= trunc_en ? clamp4(sub_v0) : 3'd0;
      last_col  <= trunc_en ? clamp4(sub_v0) + 3'(4 - LANES) : 3'(8 - LANES);
    end else if (iss_valid) begin
      iss_row <= iss_row + 1'b1;
      if (iss_row == 3'd7) begin
        if (iss_col == last_col) iss_valid <= 1'b0;
        else                     iss_col   <= iss_col + 3'(LANES);
      end
    end
  end

  always_comb begin
    iss_tag.trunc    = trunc_q;
    iss_tag.u0       = u0_q;
    iss_tag.last_col = (iss_col == last_col);
  end

  // A block may only start once the previous one has been fully issued.
  assert property (@(posedge clk) disable iff (!rst_n)
                   start |-> (!iss_valid || (iss_row == 3'd7 && iss_col == last_col)))
    else $error("dct2d_row_seq: start while a block is still being issued");

  initial assert (LANES == 1 || LANES == 2 || LANES == 4)
    else $error("dct2d_row_seq: LANES must divide 4");

endmodule
