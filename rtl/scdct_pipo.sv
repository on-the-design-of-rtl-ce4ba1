// scdct_pipo: parallel-in parallel-out holding register of the buffer engine.
//
// Copies a complete N-element vector from the SIPO in
// the cycle the SIPO reports it full, and holds it unchanged while the SCDCT
// behind it computes the coefficients of that vector, one per cycle, so the
// SIPO can already gather the next vector. q is valid from the cycle after
// load until the next load. The register is the buffer engine's PIPO; its
// width is this design's choices.
module scdct_pipo #(
  parameter int unsigned W     = 13,
  parameter int unsigned N     = 8
) (
  input  logic                 clk,
  input  logic                 load,
  input  logic signed [W-1:0]  d [N],
  output logic signed [W-1:0]  q [N]
);

  always_ff @(posedge clk) begin
    if (load) q <= d;
  end

endmodule
