// tb_e2e_full: one complete operation of the test system at its reference
// size (32 Kbyte receive buffer, +-20 ppm VCO, readings every 2^20 Tbyte).
// A source 10 ppm faster than nominal feeds an incrementing byte stream with
// Gaussian cell jitter. The receiver must fill to half (16384 bytes, about
// 3.8 ms), switch to tracking, then deliver the stream in order without any
// fault over nine level readings (one full set of eight differences),
// every cell carrying 47 bytes and the
// recovered byte count following the source within the buffer's jitter.
module tb_e2e_full;
  import e2e_pkg::*;
  localparam real FS = 19.44e6, FSRV = 4.296e6;

  logic clk = 0, rst_n = 0, dist_sel = 0, src_wr = 0;
  logic [7:0] src_data = 0;
  cell_bus_t bus;
  logic rx_valid, rd_clk, hold, tx_overflow, up, down, resync, rx_fault;
  logic [7:0] rx_data;
  logic [10:0] tx_level;
  logic [15:0] rx_level;
  logic [11:0] gap;
  logic [11:0] ctrl_word;
  rec_state_e rx_state;
  real vco_freq;

  e2e_sync_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real src_phase = 0.0;
  longint src_count = 0, rx_count = 0;
  always @(negedge clk) begin
    src_wr <= 1'b0;
    if (rst_n) begin
      src_phase += FSRV * (1.0 + 10.0e-6) / FS;
      if (src_phase >= 1.0) begin
        src_phase -= 1.0;
        src_wr   <= 1'b1;
        src_data <= src_data + 1'b1;
        src_count++;
      end
    end
  end

  int n_cells = 0, cell_bytes = 0, order_err = 0, n_fault = 0, n_samples = 0;
  logic [7:0] last_rx = 0;
  bit have_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (bus.wr) begin
      if (bus.sop) begin
        if (n_cells > 0) check(cell_bytes == 47, "47 bytes per cell");
        n_cells++;
        cell_bytes = 1;
      end else cell_bytes++;
    end
    if (resync) n_fault++;
    if (rx_valid) begin
      rx_count++;
      if (have_last && rx_data != last_rx + 1'b1) order_err++;
      last_rx = rx_data; have_last = 1;
    end
  end

  initial begin
    int fill_cycles = 0;
    longint s0, r0, ds, dr;
    repeat (4) @(negedge clk);
    rst_n = 1;
    while (rx_state == ST_FILL && fill_cycles < 200000) begin
      @(negedge clk); fill_cycles++;
    end
    $display("fill took %0d cycles, level %0d", fill_cycles, rx_level);
    check(rx_state == ST_TRACK, "tracking after fill");
    // 16384 bytes at 4.296 Mbyte/s = 74.1k cycles of 19.44 MHz, plus the
    // first cell gap; cells are bursty so allow one cell either side.
    check(fill_cycles > 72000 && fill_cycles < 76500, "fill time");
    s0 = src_count; r0 = rx_count;
    repeat (9 * (1 << 20) + 1000) @(negedge clk);
    ds = src_count - s0; dr = rx_count - r0;
    $display("source %0d bytes, recovered %0d bytes, level %0d, word %0d, freq %f",
             ds, dr, rx_level, ctrl_word, vco_freq);
    check(dr > ds - 200 && dr < ds + 200, "recovered stream keeps pace");
    check(n_fault == 0, "no fault");
    check(order_err == 0, "stream in order");
    check(rx_state == ST_TRACK, "still tracking");
    check(ctrl_word >= 12'd2047 && ctrl_word <= 12'd2052, "word near nominal");
    check(n_cells > 40000, "cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
