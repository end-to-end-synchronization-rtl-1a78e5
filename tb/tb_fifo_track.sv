// tb_fifo_track: checks the FIFO level tracker against an integer model:
// random write/read pulses, saturation at empty and full (refused pulses
// are not counted), the empty/full flags and clear.
module tb_fifo_track;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0, clear = 0, wr_pulse = 0, rd_pulse = 0;
  logic [$clog2(DEPTH):0] level;
  logic empty, full;
  int checks = 0, failures = 0, model = 0;
  int nfull = 0, nempty = 0;

  fifo_track #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t level=%0d model=%0d", what, $time, level, model); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(int'(level) == model, "level");
      check(empty == (model == 0), "empty");
      check(full == (model == DEPTH), "full");
      if (model == 0) nempty++;
      if (model == DEPTH) nfull++;
      wr_pulse = ($urandom % 100) < ((i / 400) % 2 ? 25 : 70);
      rd_pulse = ($urandom % 100) < ((i / 400) % 2 ? 70 : 25);
      clear    = (i % 1231 == 1230);
      @(posedge clk);
      if (clear) model = 0;
      else begin
        if (wr_pulse && model < DEPTH && !(rd_pulse && model > 0)) model++;
        else if (rd_pulse && model > 0 && !(wr_pulse && model < DEPTH)) model--;
      end
    end
    check(nfull > 0 && nempty > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
