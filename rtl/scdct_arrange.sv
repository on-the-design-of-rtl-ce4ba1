// scdct_arrange: arrangement stage of the SCDCT (D' = P_u D).
//
// Routes the four butterfly outputs to the four FSCMs in the order given by
// the permutation matrix P_u, so that FSCM-m always multiplies by the cosine
// factor of column m of F. Implemented as four 4:1 multiplexers driven by the
// permutation table in scdct_pkg. Combinational. The permutations are those
// of the SCDCT formulation, with P6 taken as D' = (D1, D2, D0, D3), the
// order the DCT definition requires.
module scdct_arrange
  import scdct_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic signed [W-1:0] d  [NHALF],
  input  coef_idx_t           u,
  output logic signed [W-1:0] dp [NHALF]
);

  always_comb begin
    for (int unsigned m = 0; m < NHALF; m++) begin
      dp[m] = d[PERM[u][m][1:0]];
    end
  end

endmodule
