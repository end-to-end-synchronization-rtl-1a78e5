// tb_delay_generator: loads random gaps (including 0 and 1) and checks that
// cell_enable comes exactly td+1 cycles after load, for one cycle only, and
// that busy covers the count.
module tb_delay_generator;
  logic clk = 0, rst_n = 0, load = 0;
  logic [11:0] delay = 0;
  logic cell_enable, busy;
  int checks = 0, failures = 0;

  delay_generator #(.DELAY_W(12)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int td, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!cell_enable && !busy, "idle after reset");
    for (int k = 0; k < 300; k++) begin
      td = (k < 3) ? k : 100 + int'($urandom % 150);
      @(negedge clk); load = 1; delay = 12'(td);
      @(negedge clk); load = 0;
      n = 1;
      while (!cell_enable && n < 5000) begin
        check(busy, "busy while counting");
        @(negedge clk); n++;
      end
      check(n == td + 1, $sformatf("gap td=%0d took %0d", td, n));
      @(negedge clk);
      check(!cell_enable && !busy, "single pulse");
      repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
