// tb_scdct_pipo: self-checking test of the parallel-in parallel-out register.
// A random vector is offered every cycle while load is asserted at random;
// q must follow d only on cycles with load and hold otherwise.
module tb_scdct_pipo;
  localparam int W = 13, N = 8;

  logic clk = 1'b0;
  logic                load;
  logic signed [W-1:0] d [N];
  logic signed [W-1:0] q [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scdct_pipo #(.W(W), .N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [N];
  int nload = 0;

  initial begin
    load = 1'b1;
    for (int k = 0; k < N; k++) d[k] = W'(k);
    for (int k = 0; k < N; k++) model[k] = k;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(q[k]) != model[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d k=%0d got %0d exp %0d", t, k, q[k], model[k]);
        end
      end
      load = ($urandom_range(0, 7) == 0);
      for (int k = 0; k < N; k++) d[k] = W'($urandom);
      if (load) begin
        nload++;
        for (int k = 0; k < N; k++) model[k] = int'(d[k]);
      end
      @(posedge clk);
    end
    checks++;
    if (nload < 100 || nload > 1900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
