// tb_hybrid_dpll: the digital recovery loop with modelled FIFO traffic
// (DEPTH 64, thresholds 8/56, a reading every 16 cycles). The level must
// equal writes minus accepted reads, reads are blocked during the fill
// phase, a surplus of writes drives the counter word up, a deficit drives
// it down, an underflow is a fault that flushes the level and reloads the
// reset word 2048, and an overflow does the same.
module tb_hybrid_dpll;
  import e2e_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, wr_pulse = 0, rd_tick = 0;
  logic fifo_rd, resync, up, down, fault;
  logic [11:0] ctrl_word;
  logic [6:0] level;
  rec_state_e state;
  int checks = 0, failures = 0, model = 0, nfault = 0;

  hybrid_dpll #(.DEPTH(DEPTH), .TH_LOW(8), .TH_HIGH(56), .SAMPLE_INTERVAL(16),
                .N_AVG(4), .SLOPE_TH(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t level=%0d model=%0d", what, $time, level, model); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wr_pct = 0, rd_pct = 0;
  always @(negedge clk) begin
    wr_pulse <= ($urandom % 100) < wr_pct;
    rd_tick  <= ($urandom % 100) < rd_pct;
  end

  bit resync_pending = 0;
  always @(posedge clk) if (rst_n) begin
    check(int'(level) == model, "level = writes - reads");
    check(fifo_rd == (rd_tick && state != ST_FILL), "read gated by state");
    check(fault == ((fifo_rd && model == 0) || (wr_pulse && model == DEPTH)), "fault detection");
    if (state == ST_FILL) check(!fifo_rd, "no read while filling");
    if (fault) nfault++;
    if (resync) model = 0;
    else model = model + ((wr_pulse && model < DEPTH) ? 1 : 0) - ((fifo_rd && model > 0) ? 1 : 0);
  end

  initial begin
    int w0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr_pct = 50; rd_pct = 40;
    @(negedge clk);
    check(ctrl_word == 12'd2048, "reset word");
    wait (state != ST_FILL);
    check(int'(level) >= DEPTH / 2, "left fill at half");
    w0 = int'(ctrl_word);
    repeat (1500) @(negedge clk);
    check(int'(ctrl_word) > w0, "write surplus: word rises");
    // deficit
    wr_pct = 20; rd_pct = 45;
    w0 = int'(ctrl_word);
    wait (level < 20);
    repeat (200) @(negedge clk);
    check(int'(ctrl_word) < w0, "write deficit: word falls");
    w0 = nfault;
    wait (nfault > w0);
    repeat (3) @(negedge clk);
    check(state == ST_FILL && ctrl_word == 12'd2048 && level <= 2, "underflow: flush and reset word");
    // overflow: fill, then stop reading entirely by pushing writes at 100%
    wr_pct = 100; rd_pct = 0;
    wait (state != ST_FILL);
    w0 = nfault;
    wait (nfault > w0);
    repeat (3) @(negedge clk);
    check(state == ST_FILL && level <= 2, "overflow: flush");
    check(nfault >= 2, "faults seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
