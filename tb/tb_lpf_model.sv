// tb_lpf_model: step response of the low-pass filter. With FC = 1 kHz at a
// 1 MHz sample rate the time constant is 1e6/(2*pi*1e3) = 159.15 samples:
// the output must start at V_INIT, reach 63.2% of the step after one time
// constant (within 1%), stay monotonic, and settle to the input.
module tb_lpf_model;
  logic clk = 0, rst_n = 0;
  real vin = 0.5, vout;
  int checks = 0, failures = 0;

  lpf_model #(.FC_HZ(1.0e3), .F_SAMPLE_HZ(1.0e6), .V_INIT(0.5)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s vout=%f", what, vout); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev;
    repeat (2) @(negedge clk);
    check(vout == 0.5, "reset value");
    rst_n = 1;
    vin = 1.5;
    prev = vout;
    for (int n = 1; n <= 2000; n++) begin
      @(negedge clk);
      check(vout >= prev && vout <= 1.5, "monotonic rise");
      prev = vout;
      if (n == 159) check(vout > 0.5 + 0.625 && vout < 0.5 + 0.640, "63% after one time constant");
    end
    check(vout > 1.499, "settled");
    vin = 0.0;
    repeat (3000) @(negedge clk);
    check(vout < 0.001, "falls back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
