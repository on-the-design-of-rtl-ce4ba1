// dct2d_col_seq: controller of the second SCDCT in the 2-D DCT.
//
// Each time the column SIPO holds a complete column vector T_v (start), the
// vector is copied into the PIPO and this sequencer issues the vertical
// frequencies u for it, one per cycle: u = 0..7 normally, or u = u0..u0+3
// in the 4x4 partial DCT mode. The mode, u0, the column index v and the
// last-column flag come with the vector (start_tag) and are held for the
// column. Each issue carries an out_tag_t with v and a flag on the block's
// final coefficient.
//
// Timing: issues start the cycle after start, when the PIPO output is valid;
// outputs are registers. Columns arrive at most every eight cycles, so a start
// can only coincide with the last issue of the previous column (asserted).
module dct2d_col_seq
  import scdct_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  vec_tag_t  start_tag,
  output logic      iss_valid,
  output coef_idx_t iss_u,
  output out_tag_t  iss_tag
);

  coef_idx_t last_u;
  coef_idx_t v_q;
  logic      last_col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid  <= 1'b0;
      iss_u      <= '0;
      last_u     <= '0;
      v_q        <= '0;
      last_col_q <= 1'b0;
    end else if (start) begin
      iss_valid  <= 1'b1;
      iss_u      <= start_tag.ct.trunc ? start_tag.ct.u0 : 3'd0;
      last_u     <= start_tag.ct.trunc ? start_tag.ct.u0 + 3'd3 : 3'd7;
      v_q        <= start_tag.v;
      last_col_q <= start_tag.ct.last_col;
    end else if (iss_valid) begin
      if (iss_u == last_u) iss_valid <= 1'b0;
      else                 iss_u     <= iss_u + 1'b1;
    end
  end

  always_comb begin
    iss_tag.v    = v_q;
    iss_tag.last = last_col_q && (iss_u == last_u);
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   start |-> (!iss_valid || iss_u == last_u))
    else $error("dct2d_col_seq: new column before the previous one was issued");

endmodule
