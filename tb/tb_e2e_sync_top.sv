// tb_e2e_sync_top: end-to-end run of the whole test system at reduced sizes
// (1 Kbyte receive buffer, readings every 1024 Tbyte in sets of 4, an 8-bit
// D/A and a +-2% VCO range so the loop moves within a short simulation).
// A source with a programmable frequency offset writes an incrementing byte
// stream; the recovered stream must come out in order, with gaps only where
// the receiver re-centred after a fault. Phases:
//   A  source +1%, Gaussian jitter: fill, trend UP corrections, and the
//      absolute corrections of the limit state; the recovered rate must end
//      close to the source rate;
//   B  source outage: Hold at the transmitter, receive underflow, resync and
//      refill at the reset word;
//   C  source -1%, Uniform jitter: trend DOWN corrections.
// Every cell on the bus must hold 47 bytes. A second instance with a 64-byte
// receive buffer, fed by the same source, is overflowed by single cell
// bursts: it must detect the overflow, resync and keep its stream in order
// between resyncs. Each mechanism is counted and a mechanism that never
// happened is a failure.
module tb_e2e_sync_top;
  import e2e_pkg::*;
  localparam real FS = 19.44e6, FSRV = 4.296e6;

  logic clk = 0, rst_n = 0, dist_sel = 0, src_wr = 0;
  logic [7:0] src_data = 0;
  cell_bus_t bus;
  logic rx_valid, rd_clk, hold, tx_overflow, up, down, resync, rx_fault;
  logic [7:0] rx_data;
  logic [10:0] tx_level, rx_level;
  logic [11:0] gap;
  logic [7:0] ctrl_word;
  rec_state_e rx_state;
  real vco_freq;

  e2e_sync_top #(
    .RX_DEPTH(1024), .TX_DEPTH(1024), .SAMPLE_INTERVAL(1024), .N_AVG(4),
    .SLOPE_TH(1), .CTRL_W(8), .FC_HZ(20.0e3), .PPM_RANGE(20000.0)
  ) dut (.*);

  // small instance: a 64-byte buffer cannot hold one cell burst
  cell_bus_t s_bus;
  logic s_rx_valid, s_rd_clk, s_hold, s_tx_overflow, s_up, s_down, s_resync, s_rx_fault;
  logic [7:0] s_rx_data;
  logic [10:0] s_tx_level;
  logic [6:0] s_rx_level;
  logic [11:0] s_gap;
  logic [7:0] s_ctrl_word;
  rec_state_e s_rx_state;
  real s_vco_freq;

  e2e_sync_top #(
    .RX_DEPTH(64), .TX_DEPTH(1024), .SAMPLE_INTERVAL(64), .N_AVG(4),
    .SLOPE_TH(1), .CTRL_W(8), .FC_HZ(20.0e3), .PPM_RANGE(20000.0)
  ) dut_small (
    .clk, .rst_n, .dist_sel, .src_wr, .src_data, .bus(s_bus), .rx_valid(s_rx_valid),
    .rx_data(s_rx_data), .rd_clk(s_rd_clk), .tx_level(s_tx_level), .rx_level(s_rx_level),
    .hold(s_hold), .tx_overflow(s_tx_overflow), .gap(s_gap), .ctrl_word(s_ctrl_word),
    .rx_state(s_rx_state), .up(s_up), .down(s_down), .resync(s_resync),
    .rx_fault(s_rx_fault), .vco_freq(s_vco_freq)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: phase accumulator at FSRV*(1+offset)
  real src_offset = 0.01, src_phase = 0.0;
  bit  src_on = 1;
  longint src_count = 0, rx_count = 0;
  always @(negedge clk) begin
    src_wr <= 1'b0;
    if (rst_n && src_on) begin
      src_phase += FSRV * (1.0 + src_offset) / FS;
      if (src_phase >= 1.0) begin
        src_phase -= 1.0;
        src_wr   <= 1'b1;
        src_data <= src_data + 1'b1;
        src_count++;
      end
    end
  end

  // monitors
  int n_cells = 0, n_hold = 0, n_track = 0, n_resync = 0, n_dist = 0;
  int n_trend_up = 0, n_trend_down = 0, n_abs_up = 0, n_abs_down = 0;
  int n_gaps_seen = 0, cell_bytes = 0, order_err = 0;
  logic [7:0] last_rx = 0;
  bit have_last = 0, flushed = 0;
  rec_state_e prev_state = ST_FILL;
  logic prev_dist = 0;
  int n_overflow = 0, s_order_err = 0;
  logic [7:0] s_last_rx = 0;
  bit s_have_last = 0, s_flushed = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_rx_fault && s_rx_level == 7'd64) n_overflow++;
    // a byte delivered in the resync cycle was read before the flush
    if (s_rx_valid) begin
      if (s_have_last && !s_flushed && s_rx_data != s_last_rx + 1'b1) s_order_err++;
      s_last_rx = s_rx_data; s_have_last = 1; s_flushed = 0;
    end
    if (s_resync) s_flushed = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (bus.wr) begin
      if (bus.sop) begin
        if (n_cells > 0) check(cell_bytes == 47, "47 bytes per cell");
        n_cells++;
        cell_bytes = 1;
      end else cell_bytes++;
    end
    if (hold && !$past(hold)) n_hold++;
    if (rx_state == ST_TRACK && prev_state == ST_FILL) n_track++;
    prev_state = rx_state;
    if (dist_sel != prev_dist) n_dist++;
    prev_dist = dist_sel;
    if (up   && rx_state == ST_TRACK) n_trend_up++;
    if (down && rx_state == ST_TRACK) n_trend_down++;
    if (up   && rx_state == ST_LIMIT) n_abs_up++;
    if (down && rx_state == ST_LIMIT) n_abs_down++;
    check(!tx_overflow, "transmit FIFO never overflows");
    check(vco_freq > FSRV * 0.9799 && vco_freq < FSRV * 1.0201, "VCO inside its range");
    if (rx_valid) begin
      rx_count++;
      if (have_last && !flushed && rx_data != last_rx + 1'b1) order_err++;
      last_rx = rx_data; have_last = 1; flushed = 0;
    end
    if (resync) begin n_resync++; flushed = 1; end
  end

  task automatic run(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    longint s0, r0;
    real ratio;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // phase A
    run(700000);
    s0 = src_count; r0 = rx_count;
    run(200000);
    ratio = real'(rx_count - r0) / real'(src_count - s0);
    $display("A: word %0d state %s level %0d read/source rate %f", ctrl_word, rx_state.name(), rx_level, ratio);
    check(ratio > 0.995 && ratio < 1.005, "recovered rate follows the source");
    check(int'(ctrl_word) > 128 + 32, "counter moved up for a fast source");
    check(n_resync == 0, "no fault while tracking");
    // phase B
    src_on = 0;
    run(8000);
    src_on = 1;
    run(20000);
    check(n_resync > 0, "outage ends in a resync");
    // phase C
    dist_sel = 1;
    src_offset = -0.01;
    run(1200000);
    $display("C: word %0d state %s level %0d", ctrl_word, rx_state.name(), rx_level);
    check(int'(ctrl_word) < 128 - 16, "counter moved down for a slow source");
    check(order_err == 0, "recovered stream in order");
    $display("cells %0d hold %0d track-entries %0d resync %0d dist-switch %0d",
             n_cells, n_hold, n_track, n_resync, n_dist);
    $display("trend up %0d trend down %0d absolute up %0d absolute down %0d order errors %0d",
             n_trend_up, n_trend_down, n_abs_up, n_abs_down, order_err);
    check(n_cells > 0, "cells sent");
    check(n_hold > 0, "hold happened");
    check(n_track > 1, "fill phase completed (after reset and after resync)");
    check(n_resync > 0, "resync happened");
    check(n_dist > 0, "distribution switched");
    check(n_trend_up > 0, "trend UP happened");
    check(n_trend_down > 0, "trend DOWN happened");
    check(n_abs_up > 0, "absolute UP happened");
    check(n_abs_down > 0, "absolute DOWN happened");
    check(n_overflow > 0, "receive overflow detected (small buffer)");
    check(s_order_err == 0, "small buffer: stream in order between resyncs");
    $display("small buffer: overflows %0d", n_overflow);
    check(rx_count > 100000, "data delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
