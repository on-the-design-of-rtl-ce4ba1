// scdct_fscm: finite selection coefficient multiplier (FSCM-1..4).
//
// Multiplies a signed data element by one of the three fixed cosine factors
// of column COL of F (row A, B or C, picked by sel) without a multiplier:
// every digit position b of the selected factor decides whether x * 2^b is
// added (+1 digit), subtracted (-1 digit) or skipped (0). The result is the
// product scaled by 2^12, exact (no bits dropped).
//
// Two pipeline stages: the first adds the terms of the upper and of the lower
// six digit positions into two registered partial sums, the second adds the
// two. Latency FSCM_LAT = 2 cycles, one new operand per cycle. The digit
// strings come from the FSCM factor table; the split into two stages is this
// design's choice. COL is 0..3 for FSCM-1..4.
module scdct_fscm
  import scdct_pkg::*;
#(
  parameter int unsigned W   = 10,
  parameter int unsigned COL = 0
) (
  input  logic                  clk,
  input  logic signed [W-1:0]   x,
  input  fsel_t                 sel,
  output logic signed [W+11:0]  p
);

  localparam int unsigned PW   = W + 12;
  localparam int unsigned HALF = COEF_FRAC / 2;

  csd_t fac;
  logic signed [PW-1:0] lo_c, hi_c, lo_q, hi_q;

  always_comb begin
    fac = FACTOR[sel == SEL_C ? 2 : (sel == SEL_B ? 1 : 0)][COL];
    lo_c = '0;
    hi_c = '0;
    for (int unsigned b = 0; b < COEF_FRAC; b++) begin
      logic signed [PW-1:0] t;
      t = PW'(x) <<< b;
      if (b < HALF) begin
        if (fac.pos[b])      lo_c = lo_c + t;
        else if (fac.neg[b]) lo_c = lo_c - t;
      end else begin
        if (fac.pos[b])      hi_c = hi_c + t;
        else if (fac.neg[b]) hi_c = hi_c - t;
      end
    end
  end

  always_ff @(posedge clk) begin
    lo_q <= lo_c;
    hi_q <= hi_c;
    p    <= lo_q + hi_q;
  end

endmodule
