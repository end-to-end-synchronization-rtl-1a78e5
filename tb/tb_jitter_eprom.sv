// tb_jitter_eprom: reads the whole jitter table and checks the statistics of
// both halves against the intended distributions (mean 164.5 Tbyte, standard
// deviation 15 Tbyte), the monotonic shape of an inverse distribution
// function, the Gaussian tails versus the bounded Uniform range, and the
// one-cycle read latency.
module tb_jitter_eprom;
  logic clk = 0;
  logic [8:0] addr = 0;
  logic [11:0] data;
  int checks = 0, failures = 0;

  jitter_eprom dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum[2], sq[2], mean, sd;
    int v[2][256];
    for (int t = 0; t < 2; t++) begin sum[t] = 0; sq[t] = 0; end
    for (int a = 0; a < 512; a++) begin
      @(negedge clk) addr = 9'(a);
      @(posedge clk); #1;
      v[a / 256][a % 256] = int'(data);
      sum[a / 256] += real'(data);
      sq[a / 256]  += real'(data) * real'(data);
    end
    for (int t = 0; t < 2; t++) begin
      mean = sum[t] / 256.0;
      sd   = $sqrt(sq[t] / 256.0 - mean * mean);
      $display("table %0d: mean %f sd %f min %0d max %0d", t, mean, sd, v[t][0], v[t][255]);
      check(mean > 164.3 && mean < 164.7, "mean 164.5");
      check(sd > 14.0 && sd < 16.0, "sd 15");
      for (int i = 1; i < 256; i++) check(v[t][i] >= v[t][i-1], "monotonic");
    end
    // Gaussian tails reach about 2.9 sd; Uniform is bounded by sqrt(3) sd.
    check(v[0][0] < 125 && v[0][255] > 204, "gaussian tails");
    check(v[1][0] >= 138 && v[1][255] <= 191, "uniform bounds");
    // latency: data changes only after the clock edge
    @(negedge clk) addr = 9'd0;
    @(posedge clk); #1;
    @(negedge clk) addr = 9'd255;
    #1 check(int'(data) == v[0][0], "registered read holds");
    @(posedge clk); #1 check(int'(data) == v[0][255], "registered read updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
