// tb_workload_jitter: the evaluation workload of the design at its reference
// size: a 34.368 Mbit/s (4.296 Mbyte/s) service carried in 47-byte cells over
// the 155.52 Mbit/s line with intercell gaps of mean 164.5 and standard
// deviation 15 Tbyte, first Gaussian, then Uniform, into the 32 Kbyte
// receive buffer. Like the evaluation histograms, it sorts the buffer level,
// sampled every 1024 Tbyte, into 34 zones: zone 1 counts underflows, zones
// 2..33 cover 1024 positions each, zone 34 counts overflows; and it sorts the
// recovered frequency into 8 bins across fo +-20 ppm. Checks: no underflow or
// overflow, the level stays within two zones of half-full, the frequency
// stays in range, and the stream arrives in order.
module tb_workload_jitter;
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
  always @(negedge clk) begin
    src_wr <= 1'b0;
    if (rst_n) begin
      src_phase += FSRV * (1.0 + 5.0e-6) / FS;
      if (src_phase >= 1.0) begin
        src_phase -= 1.0;
        src_wr   <= 1'b1;
        src_data <= src_data + 1'b1;
      end
    end
  end

  int zone[35];
  int fbin[8];
  int order_err = 0, samples = 0, sample_cnt = 0, min_zone = 99, max_zone = 0;
  bit collect = 0, have_last = 0;
  logic [7:0] last_rx = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      if (have_last && rx_data != last_rx + 1'b1) order_err++;
      last_rx = rx_data; have_last = 1;
    end
    if (collect) begin
      int z, b;
      if (rx_fault && rx_level == 0) zone[1]++;
      if (rx_fault && rx_level != 0) zone[34]++;
      sample_cnt++;
      if (sample_cnt == 1024) begin
        sample_cnt = 0;
        samples++;
        z = 2 + int'(rx_level) / 1024;
        if (z > 33) z = 33;
        zone[z]++;
        if (z < min_zone) min_zone = z;
        if (z > max_zone) max_zone = z;
        b = int'((vco_freq / FSRV - 1.0) * 1.0e6 / 5.0 + 4.0);
        if (b < 0) b = 0;
        if (b > 7) b = 7;
        fbin[b]++;
      end
    end
  end

  task automatic report(input string name);
    $display("%s: %0d level samples, zones %0d..%0d", name, samples, min_zone, max_zone);
    for (int z = 1; z <= 34; z++) if (zone[z] != 0) $display("  zone %0d: %0d", z, zone[z]);
    for (int b = 0; b < 8; b++) $display("  f bin %0d (%0d..%0d ppm): %0d", b, 5*b-20, 5*b-15, fbin[b]);
    check(zone[1] == 0 && zone[34] == 0, {name, ": no underflow or overflow"});
    check(min_zone >= 16 && max_zone <= 19, {name, ": level near half-full"});
    check(fbin[0] == 0 && fbin[7] == 0, {name, ": frequency away from the range ends"});
    check(samples > 3000, {name, ": enough samples"});
    for (int z = 0; z < 35; z++) zone[z] = 0;
    for (int b = 0; b < 8; b++) fbin[b] = 0;
    samples = 0; min_zone = 99; max_zone = 0;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (rx_state == ST_TRACK);
    collect = 1;
    repeat (4000000) @(negedge clk);
    report("Gaussian STD=15");
    dist_sel = 1;
    repeat (4000000) @(negedge clk);
    report("Uniform STD=15");
    check(order_err == 0, "stream in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
