// tb_scdct_sipo: self-checking test of the serial-in parallel-out buffer.
// Random elements with random gaps are pushed in; every eighth accepted
// element must raise full for exactly one cycle, the cycle after it was
// presented, with vec holding the last eight elements in arrival order and
// last_tag the tag of the eighth.
module tb_scdct_sipo;
  localparam int W = 9, N = 8, TW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                in_valid;
  logic signed [W-1:0] in_data [1];
  logic [TW-1:0]       in_tag;
  logic signed [W-1:0] vec [N];
  logic [TW-1:0]       last_tag;
  logic                full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scdct_sipo #(.W(W), .N(N), .LANES(1), .TAG_W(TW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  int tags [$];
  int accepted = 0, nfull = 0;
  bit expect_full = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (full != expect_full) begin
        failures++;
        if (failures < 10) $display("full=%0b expected %0b", full, expect_full);
      end
      if (full) begin
        nfull++;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (int'(vec[k]) != hist[hist.size() - N + k]) failures++;
        end
        checks++;
        if (int'(last_tag) != tags[tags.size() - 1]) failures++;
      end
    end
  end

  initial begin
    in_valid = 0;
    in_data[0] = '0;
    in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data[0] = W'($urandom);
      in_tag = TW'($urandom);
      @(posedge clk);
      expect_full = 0;
      if (in_valid) begin
        hist.push_back(int'(in_data[0]));
        tags.push_back(int'(in_tag));
        accepted++;
        expect_full = (accepted % N == 0);
      end
    end
    @(negedge clk);
    checks++;
    if (nfull != accepted / N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
