// scdct_dvec: add/subtract stage of the SCDCT (data vector D(u)).
//
// For coefficient index u the four butterfly outputs are
//   D_k = s_k(u) * ( f(k) + (-1)^u f(7-k) ),  k = 0..3,
// with s_0 = +1 and s_1..s_3 = (-1)^p(u), (-1)^q(u), (-1)^r(u) where
// p(u) = floor((u+2)/5), q(u) = floor((u+1)/3), r(u) = floor(u/2).
// Even u takes sums, odd u takes differences; the sign flips make every
// later product positive so that a single set of unsigned cosine factors
// serves all eight coefficients.
//
// The butterfly and its sign rules are those of the SCDCT formulation; the
// widths are this design's choice.
//
// Purely combinational; the enclosing SCDCT registers the result. Inputs are
// signed IN_W bits, outputs signed IN_W+2 bits: a sum needs IN_W+1 bits and
// negating the most negative sum one more.
module scdct_dvec
  import scdct_pkg::*;
#(
  parameter int unsigned IN_W = 9
) (
  input  logic signed [IN_W-1:0] f [NPT],
  input  coef_idx_t              u,
  output logic signed [IN_W+1:0] d [NHALF]
);

  always_comb begin
    for (int unsigned k = 0; k < NHALF; k++) begin
      logic signed [IN_W+1:0] a, b, s;
      a = (IN_W+2)'(f[k]);
      b = (IN_W+2)'(f[NPT-1-k]);
      s = u[0] ? (a - b) : (a + b);
      d[k] = neg_of(k, u) ? -s : s;
    end
  end

endmodule
