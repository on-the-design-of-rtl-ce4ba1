// scdct_pkg: constants and types shared by the selective coefficient DCT
// (SCDCT) datapath and the 2-D DCT built from it.
//
// The 8-point DCT is written as C(u) = [P_u D(u)]^T [S_u F]. F has three rows
// of cosine factors (A = DC/Nyquist, B = u 2/6, C = odd u) and four columns;
// each column is served by one finite selection coefficient multiplier
// (FSCM-1..4). Every factor is held as a signed-digit string of twelve
// fractional digits, split into a mask of +1 digits and a mask of -1 digits;
// bit b of a mask has weight 2^(b-12), so the integer value of a factor is
// (pos - neg) scaled by 2^12. The digit strings are those of the FSCM table:
// A1 is canonical signed digit in FSCM-1/2 and plain binary in FSCM-3/4
// (the same value, 1448/4096). Integer values: A1 1448, B1 1892, B2 784,
// C1 2008, C2 1703, C3 1138, C4 400 (all /4096).
//
// The sign rules p(u) = floor((u+2)/5), q(u) = floor((u+1)/3), r(u) =
// floor(u/2) and the permutations P_u follow the SCDCT formulation; P6 is
// taken as D' = (D1, D2, D0, D3), which is the order the DCT definition needs.
package scdct_pkg;

  localparam int unsigned NPT       = 8;   // DCT length
  localparam int unsigned NHALF     = 4;   // butterfly outputs / FSCMs
  localparam int unsigned COEF_FRAC = 12;  // fractional digits of a factor
  localparam int unsigned DVEC_LAT  = 1;   // register after add/subtract
  localparam int unsigned ARR_LAT   = 1;   // register after arrangement
  localparam int unsigned FSCM_LAT  = 2;   // pipeline stages inside an FSCM
  localparam int unsigned SUM_LAT   = 1;   // register after final sum/round
  localparam int unsigned SCDCT_LAT = DVEC_LAT + ARR_LAT + FSCM_LAT + SUM_LAT;

  // Row of F chosen by the selection matrix S_u.
  typedef enum logic [1:0] {
    SEL_A = 2'd0,   // u = 0, 4
    SEL_B = 2'd1,   // u = 2, 6
    SEL_C = 2'd2    // u = 1, 3, 5, 7
  } fsel_t;

  // One cosine factor as signed digits.
  typedef struct packed {
    logic [COEF_FRAC-1:0] pos;
    logic [COEF_FRAC-1:0] neg;
  } csd_t;

  typedef logic [2:0] coef_idx_t;   // u, row or column index 0..7

  // F[row][column]: rows A, B, C; columns = FSCM-1..4.
  localparam csd_t FACTOR [3][NHALF] = '{
    '{ '{12'b100000101000, 12'b001010000000},    // A1 (CSD)
       '{12'b100000101000, 12'b001010000000},    // A1 (CSD)
       '{12'b010110101000, 12'b000000000000},    // A1 (binary)
       '{12'b010110101000, 12'b000000000000} },  // A1 (binary)
    '{ '{12'b100000000100, 12'b000010100000},    // B1
       '{12'b100000000100, 12'b000010100000},    // B1
       '{12'b010000010000, 12'b000100000000},    // B2
       '{12'b010000010000, 12'b000100000000} },  // B2
    '{ '{12'b100000000000, 12'b000000101000},    // C1
       '{12'b100010101000, 12'b001000000001},    // C2
       '{12'b010010000010, 12'b000000010000},    // C3
       '{12'b000110010000, 12'b000000000000} }   // C4
  };

  // P_u as a source index per FSCM column: D'_m = D_{PERM[u][m]}.
  localparam coef_idx_t PERM [NPT][NHALF] = '{
    '{3'd0, 3'd1, 3'd2, 3'd3},   // P0
    '{3'd0, 3'd1, 3'd2, 3'd3},   // P1
    '{3'd0, 3'd3, 3'd1, 3'd2},   // P2
    '{3'd2, 3'd0, 3'd3, 3'd1},   // P3
    '{3'd0, 3'd1, 3'd2, 3'd3},   // P4
    '{3'd1, 3'd3, 3'd0, 3'd2},   // P5
    '{3'd1, 3'd2, 3'd0, 3'd3},   // P6
    '{3'd3, 3'd2, 3'd1, 3'd0}    // P7
  };

  // Selection matrix S_u; only u[1:0] matters (u mod 4).
  function automatic fsel_t sel_of(input logic [1:0] u_lo);
    if (u_lo[0])      return SEL_C;
    else if (u_lo[1]) return SEL_B;
    else              return SEL_A;
  endfunction

  // Sign flip of D_k(u), k = 1..3: (-1)^p(u), (-1)^q(u), (-1)^r(u).
  function automatic logic neg_of(input int unsigned k, input coef_idx_t u);
    int unsigned n;
    n = int'(u);
    case (k)
      1:       return 1'(((n + 2) / 5) & 1);
      2:       return 1'(((n + 1) / 3) & 1);
      3:       return 1'((n / 2) & 1);
      default: return 1'b0;
    endcase
  endfunction

  // 2-D DCT: side band travelling with a column element through the first
  // SCDCT (mode of the block it belongs to).
  typedef struct packed {
    logic      trunc;     // 4x4 partial DCT mode
    coef_idx_t u0;        // first vertical frequency of the 4x4 sub-block
    logic      last_col;  // element belongs to the block's last column
  } col_tag_t;

  // 2-D DCT: side band travelling with a coefficient through the second SCDCT.
  typedef struct packed {
    coef_idx_t v;         // horizontal frequency (column of the result)
    logic      last;      // last coefficient of the block
  } out_tag_t;

  // Column vector leaving the SIPO: its mode tag plus its column index.
  typedef struct packed {
    col_tag_t  ct;
    coef_idx_t v;
  } vec_tag_t;

endpackage
