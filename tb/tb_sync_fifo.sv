// tb_sync_fifo: self-checking test of sync_fifo against a queue reference
// model. Random writes and reads (including writes when full and reads when
// empty) are checked for data order, one-cycle read latency, full/empty
// flags, overflow/underflow reporting and flush.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic rd_valid, empty, full, overflow, underflow;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  logic exp_valid, exp_over, exp_under;
  logic [7:0] exp_data;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

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
    exp_valid = 0; exp_over = 0; exp_under = 0; exp_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // bias phases: fill, drain, mixed
      wr_en   = ($urandom % 100) < ((i / 500) % 2 ? 30 : 75);
      rd_en   = ($urandom % 100) < ((i / 500) % 2 ? 75 : 30);
      flush   = (i % 997 == 996);
      wr_data = 8'($urandom);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      @(posedge clk);
      // reference
      exp_over  = wr_en && (q.size() == DEPTH) && !flush;
      exp_under = rd_en && (q.size() == 0) && !flush;
      exp_valid = rd_en && (q.size() != 0) && !flush;
      if (exp_valid) exp_data = q.pop_front();
      if (wr_en && !flush && !exp_over) q.push_back(wr_data);
      if (flush) q.delete();
      #1;
      check(rd_valid == exp_valid, "rd_valid");
      if (exp_valid) check(rd_data == exp_data, "rd_data");
      check(overflow == exp_over, "overflow");
      check(underflow == exp_under, "underflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
