// tb_updown_counter: random UP/DOWN/load (random load words) against an
// integer model, with runs
// long enough to hit both saturation limits (W = 4 here).
module tb_updown_counter;
  logic clk = 0, rst_n = 0, load = 0, up = 0, down = 0;
  logic [3:0] load_word = 4'd8;
  logic [3:0] count;
  int checks = 0, failures = 0, model = 8, nmax = 0, nmin = 0;

  updown_counter #(.W(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t count=%0d model=%0d", what, $time, count, model); end
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
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(int'(count) == model, "count");
      if (model == 15) nmax++;
      if (model == 0) nmin++;
      up   = ($urandom % 100) < ((i / 200) % 2 ? 15 : 80);
      down = ($urandom % 100) < ((i / 200) % 2 ? 80 : 15);
      load = ($urandom % 100) == 0;
      load_word = 4'($urandom);
      @(posedge clk);
      if (load) model = int'(load_word);
      else if (up && !down && model < 15) model++;
      else if (down && !up && model > 0) model--;
    end
    check(nmax > 0 && nmin > 0, "limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
