// tb_vco_model: counts output ticks over a fixed window at the centre, top
// and bottom of the control range and beyond it (clamping), with a widened
// tuning range of +-1% so the offsets are visible in a short run. Expected
// counts are computed from the tuning law here; the tick must last one clk.
module tb_vco_model;
  logic clk = 0, rst_n = 0;
  real vctrl = 0.5, freq_hz;
  logic clk_out, tick;
  int checks = 0, failures = 0;
  localparam real FS = 19.44e6, FC = 4.296e6;

  vco_model #(.F_CENTER_HZ(FC), .PPM_RANGE(10000.0), .VREF(1.0), .F_SYS_HZ(FS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real v, input real fexp);
    int n, ntog;
    real expn;
    logic prev_tick, prev_clk;
    vctrl = v;
    n = 0; ntog = 0; prev_tick = 0; prev_clk = clk_out;
    @(negedge clk);
    for (int i = 0; i < 200000; i++) begin
      @(negedge clk);
      if (tick) n++;
      if (tick && prev_tick) check(0, "tick longer than one cycle");
      if (clk_out && !prev_clk) ntog++;
      prev_tick = tick; prev_clk = clk_out;
    end
    expn = 200000.0 * fexp / FS;
    $display("v=%f ticks %0d expected %f freq %f", v, n, expn, freq_hz);
    check(real'(n) > expn - 2.0 && real'(n) < expn + 2.0, "tick count");
    check(ntog > n - 2 && ntog < n + 2, "clk_out period");
    check(freq_hz > fexp * 0.999999 && freq_hz < fexp * 1.000001, "reported frequency");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    measure(0.5, FC);
    measure(1.0, FC * 1.01);
    measure(0.0, FC * 0.99);
    measure(0.75, FC * 1.005);
    measure(2.0, FC * 1.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
