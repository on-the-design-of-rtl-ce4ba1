// tb_scdct: self-checking test of the SCDCT module.
// A random frame and a random coefficient index u enter every cycle (with a
// few idle cycles mixed in). Each output must equal the reference integer
// model bit for bit, must appear exactly SCDCT_LAT = 5 cycles after its
// input with its u and tag, and must be within 1.5 LSB of the ideal real
// DCT coefficient (9-bit input, 2 fractional output bits as in the 2-D DCT).
module tb_scdct;
  import scdct_pkg::*;
  import tb_ref_pkg::*;

  localparam int IN_W = 9, OUT_W = 13, SHIFT = 10, TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                    in_valid;
  logic signed [IN_W-1:0]  in_f [NPT];
  coef_idx_t               in_u;
  logic [TAG_W-1:0]        in_tag;
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_c;
  coef_idx_t               out_u;
  logic [TAG_W-1:0]        out_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scdct #(.IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT), .TAG_W(TAG_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    longint f [8];
    int     u;
    int     tag;
    int     cyc;
  } item_t;
  item_t q [$];
  int    cyc = 0;
  int    nout = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      longint e;
      real    r;
      it = q.pop_front();
      e = ref_1d(it.f, it.u, SHIFT);
      r = dct_real(it.f, it.u) * 4.0;
      checks += 4;
      if (longint'(out_c) != e) begin
        failures++;
        if (failures < 10) $display("u=%0d got %0d exp %0d", it.u, out_c, e);
      end
      if (int'(out_u) != it.u || int'(out_tag) != it.tag) failures++;
      if (cyc - it.cyc != int'(SCDCT_LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d", cyc - it.cyc);
      end
      if ((real'(out_c) - r) > 1.5 || (r - real'(out_c)) > 1.5) begin
        failures++;
        if (failures < 10) $display("accuracy u=%0d got %0d ideal %f", it.u, out_c, r);
      end
      nout++;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_u = '0;
    in_tag = '0;
    for (int n = 0; n < 8; n++) in_f[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = (t % 97 != 50);
      for (int n = 0; n < 8; n++) begin
        if (t < 8)       in_f[n] = (n % 2 == 0) ? 255 : -256;
        else if (t < 16) in_f[n] = -256;
        else             in_f[n] = IN_W'($urandom);
      end
      in_u = 3'(t);
      in_tag = TAG_W'($urandom);
      if (in_valid) begin
        item_t it;
        for (int n = 0; n < 8; n++) it.f[n] = longint'(in_f[n]);
        it.u = int'(in_u);
        it.tag = int'(in_tag);
        it.cyc = cyc;
        q.push_back(it);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q.size() != 0 || nout < 2900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
