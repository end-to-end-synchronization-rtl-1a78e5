// tb_scrambler: checks that the scrambler's sequence has period exactly 2^N
// and visits every N-bit value once per period (uniform distribution), for
// N = 8 and N = 10, and that it holds while step is low.
module tb_scrambler;
  logic clk = 0, rst_n = 0, step = 0;
  logic [7:0] v8;
  logic [9:0] v10;
  int checks = 0, failures = 0;

  scrambler #(.N(8))  dut8  (.clk, .rst_n, .step, .value(v8));
  scrambler #(.N(10)) dut10 (.clk, .rst_n, .step, .value(v10));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen8[256];
    bit seen10[1024];
    logic [7:0] first8;
    logic [9:0] first10;
    int dup8 = 0, dup10 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(v8 == 8'd1 && v10 == 10'd1, "reset value");
    first8 = v8; first10 = v10;
    for (int i = 0; i < 1024; i++) begin
      if (i < 256) begin
        if (seen8[v8]) dup8++;
        seen8[v8] = 1;
      end
      if (seen10[v10]) dup10++;
      seen10[v10] = 1;
      // hold test: step low for one cycle now and then
      step = 0;
      if (i % 97 == 5) begin
        logic [9:0] keep;
        keep = v10;
        @(negedge clk);
        check(v10 == keep, "hold without step");
      end
      step = 1;
      @(negedge clk);
      if (i == 255) check(v8 == first8, "period 256");
      if (i < 255)  check(v8 != first8, "no early repeat N=8");
    end
    step = 0;
    check(v10 == first10, "period 1024");
    check(dup8 == 0 && dup10 == 0, "each value once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
