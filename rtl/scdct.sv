// scdct: selective coefficient 8-point 1-D DCT module.
//
// Given an eight-element frame f(0..7) and a coefficient index u, computes
// the single DCT coefficient
//   C(u) = alpha(u) * sum_n f(n) cos(pi u (2n+1) / 16)
// as C(u) = [P_u D(u)]^T [S_u F]:
//   1. scdct_dvec  forms the butterfly vector D(u) with its sign flips,
//   2. scdct_arrange reorders it by P_u,
//   3. four scdct_fscm units multiply by the F column factors chosen by S_u,
//   4. a four-input adder sums the products and rounds.
// There is no multiplier. Any u may be requested in any cycle, with a new
// frame every cycle if wanted, so the module yields one coefficient per cycle
// in whatever order the caller wants.
//
// Interface: in_valid/in_f/in_u/in_tag enter together; out_valid, out_c,
// out_u and out_tag appear SCDCT_LAT = 5 cycles later (one register after the
// add/subtract stage, one after the arrangement, two inside the FSCMs, one
// after the final sum). in_tag is an opaque side band carried along with the
// data. There is no stall: the pipeline advances every cycle.
//
// Arithmetic: inputs signed IN_W bits, factors have 12 fractional bits, the
// products are exact and the final sum is rounded (half up) by SHIFT bits:
// out_c = round(C(u) * 2^(12-SHIFT)), kept to OUT_W bits. Widths, the
// rounding rule and the pipeline cut points are this design's choices.
module scdct
  import scdct_pkg::*;
#(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 13,
  parameter int unsigned SHIFT = 10,
  parameter int unsigned TAG_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_f [NPT],
  input  coef_idx_t               in_u,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_c,
  output coef_idx_t               out_u,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int unsigned DW   = IN_W + 2;     // butterfly width
  localparam int unsigned PW   = DW + 12;      // FSCM product width
  localparam int unsigned SW   = PW + 2;       // sum of four products
  localparam int unsigned PIPE = SCDCT_LAT - 1;

  // Side band pipeline: valid, u and tag for stages 1..4.
  logic             v_q   [PIPE];
  coef_idx_t        u_q   [PIPE];
  logic [TAG_W-1:0] tag_q [PIPE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PIPE); i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < int'(PIPE); i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    u_q[0]   <= in_u;
    tag_q[0] <= in_tag;
    for (int i = 1; i < int'(PIPE); i++) begin
      u_q[i]   <= u_q[i-1];
      tag_q[i] <= tag_q[i-1];
    end
  end

  // Stage 1: add/subtract.
  logic signed [DW-1:0] d_c [NHALF];
  logic signed [DW-1:0] d_q [NHALF];

  scdct_dvec #(.IN_W(IN_W)) u_dvec (.f(in_f), .u(in_u), .d(d_c));

  always_ff @(posedge clk) d_q <= d_c;

  // Stage 2: arrangement.
  logic signed [DW-1:0] a_c [NHALF];
  logic signed [DW-1:0] a_q [NHALF];
  fsel_t                sel_q;

  scdct_arrange #(.W(DW)) u_arr (.d(d_q), .u(u_q[0]), .dp(a_c));

  always_ff @(posedge clk) begin
    a_q   <= a_c;
    sel_q <= sel_of(u_q[0][1:0]);
  end

  // Stages 3-4: the four FSCMs.
  logic signed [PW-1:0] prod [NHALF];

  for (genvar m = 0; m < int'(NHALF); m++) begin : g_fscm
    scdct_fscm #(.W(DW), .COL(m)) u_fscm (
      .clk (clk),
      .x   (a_q[m]),
      .sel (sel_q),
      .p   (prod[m])
    );
  end

  // Stage 5: sum of products and rounding.
  logic signed [SW-1:0] sum_c;

  always_comb begin
    sum_c = SW'(prod[0]) + SW'(prod[1]) + SW'(prod[2]) + SW'(prod[3]);
    if (SHIFT > 0) sum_c = sum_c + (SW'(1) <<< (SHIFT - 1));
    sum_c = sum_c >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q[PIPE-1];
  end

  always_ff @(posedge clk) begin
    out_c   <= OUT_W'(sum_c);
    out_u   <= u_q[PIPE-1];
    out_tag <= tag_q[PIPE-1];
  end

endmodule
