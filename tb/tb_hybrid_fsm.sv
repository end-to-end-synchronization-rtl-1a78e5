// tb_hybrid_fsm: drives the FIFO level directly (DEPTH 64, thresholds 8/56,
// a reading every 8 cycles, sets of 4 differences, dead band 1 byte per
// reading) and checks each procedure of the recovery state machine: the fill
// phase and its exit at half depth, no correction for a flat level or a
// trend inside the dead band, UP for a rising and DOWN for a falling trend,
// one absolute correction per reading beyond each threshold (exact pulse
// spacing), and the fault response (resync, reset word, reading stopped).
module tb_hybrid_fsm;
  import e2e_pkg::*;
  localparam int DEPTH = 64, SI = 8;
  logic clk = 0, rst_n = 0, fault = 0;
  logic [6:0] level = 0;
  logic up, down, load, resync, reading;
  logic [11:0] reset_word;
  rec_state_e state;
  int checks = 0, failures = 0;
  int nup = 0, ndown = 0, last_up = -1, cyc = 0;

  hybrid_fsm #(.DEPTH(DEPTH), .TH_LOW(8), .TH_HIGH(56), .SAMPLE_INTERVAL(SI),
               .N_AVG(4), .SLOPE_TH(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (up %0d down %0d)", what, $time, nup, ndown); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit spacing_check = 0;
  always @(posedge clk) begin
    cyc++;
    if (up) nup++;
    if (down) ndown++;
    if (spacing_check && up) begin
      if (last_up >= 0) check(cyc - last_up == SI, "absolute UP once per reading");
      last_up = cyc;
    end
  end

  // run n readings with the level changing by step after each
  task automatic ramp(input int step, input int n);
    for (int i = 0; i < n; i++) begin
      repeat (SI) @(negedge clk);
      level = 7'(int'(level) + step);
    end
  endtask

  task automatic window(input int step, input int n, output int u, output int d);
    int u0, d0;
    u0 = nup; d0 = ndown;
    ramp(step, n);
    u = nup - u0; d = ndown - d0;
  endtask

  initial begin
    int u, d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_FILL && load && !reading, "fill after reset");
    check(reset_word == 12'd2048, "reset word is mid-scale");
    level = 31;
    repeat (20) @(negedge clk);
    check(state == ST_FILL, "stays in fill below half");
    level = 32;
    @(negedge clk); @(negedge clk);
    check(state == ST_TRACK && !load && reading, "track at half depth");
    window(0, 16, u, d);  check(u == 0 && d == 0, "flat level: no correction");
    window(1, 16, u, d);  check(u == 0 && d == 0, "slope inside dead band: no correction");
    level = 24;
    window(0, 8, u, d);   // the step itself is one large difference: let it pass
    window(2, 12, u, d);  check(u >= 2 && d == 0, "rising trend: UP");
    window(-2, 12, u, d); check(d >= 2 && u == 0, "falling trend: DOWN");
    window(0, 8, u, d);
    level = 60;
    @(negedge clk);
    spacing_check = 1;
    window(0, 10, u, d);
    spacing_check = 0;
    check(state == ST_LIMIT, "limit state above TH_HIGH");
    check(u >= 9 && u <= 10 && d == 0, "absolute UP per reading");
    level = 4;
    window(0, 10, u, d);
    check(d >= 9 && d <= 10 && u == 0, "absolute DOWN per reading");
    level = 30;
    window(0, 6, u, d);
    check(state == ST_TRACK, "back to track between thresholds");
    @(negedge clk) fault = 1;
    @(negedge clk) fault = 0;
    check(resync && state == ST_FILL && load && !reading, "fault: resync and reset word");
    @(negedge clk);
    check(!resync, "resync is one pulse");
    level = 0;
    repeat (30) @(negedge clk);
    check(nup == nup && state == ST_FILL, "refill waits for half depth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
