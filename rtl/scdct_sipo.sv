// scdct_sipo: serial-in parallel-out buffer of the buffer engine.
//
// Gathers N elements, arriving LANES at a time, into one vector, element 0
// being the first one received (lane 0 before lane 1 within a beat). Each
// accepted beat is written into slots cnt*LANES .. cnt*LANES+LANES-1; when
// the beat completing a vector has been written, full pulses high for one
// cycle and vec holds the complete vector during that cycle (it is
// overwritten from the next accepted beat on, so a consumer must copy it
// then, which is what scdct_pipo does). last_tag is the opaque side-band tag
// of the beat that completed the vector.
//
// Timing: in_valid/in_data are sampled on the clock edge; full is registered
// and rises the cycle after the last beat was presented. Input may have gaps
// of any length. LANES must divide N. Writing by index instead of shifting
// and the multi-lane input are this design's choices; the buffer engine
// itself is only named by the SCDCT description.
module scdct_sipo #(
  parameter int unsigned W     = 9,
  parameter int unsigned N     = 8,
  parameter int unsigned LANES = 1,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_data [LANES],
  input  logic [TAG_W-1:0]     in_tag,
  output logic signed [W-1:0]  vec [N],
  output logic [TAG_W-1:0]     last_tag,
  output logic                 full
);

  localparam int unsigned BEATS = N / LANES;
  localparam int unsigned CW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      full <= 1'b0;
    end else begin
      full <= in_valid && (cnt == CW'(BEATS - 1));
      if (in_valid) cnt <= (cnt == CW'(BEATS - 1)) ? '0 : cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int unsigned l = 0; l < LANES; l++) vec[int'(cnt) * LANES + l] <= in_data[l];
      last_tag <= in_tag;
    end
  end

  initial assert (N % LANES == 0) else $error("scdct_sipo: LANES must divide N");

endmodule
