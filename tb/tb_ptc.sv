// tb_ptc: the transfer control unit with a model transmit FIFO source.
// Phase 1 (source slightly faster than the cells, Hold idle): over one full
// scrambler period of 256 cells the measured gaps must be exactly the 256
// entries of the selected table (checked for the Gaussian and then the
// Uniform table, read independently from the table file), and every cell is
// 47 consecutive bytes. Phase 2 (slow source): Hold must appear, no read may
// happen while the FIFO level is zero, and cells still carry 47 bytes.
module tb_ptc;
  logic clk = 0, rst_n = 0, dist_sel = 0, src_wr = 0;
  logic fifo_rd, bus_wr, bus_sop, hold;
  logic [10:0] tx_level;
  logic [11:0] gap;
  int checks = 0, failures = 0;
  logic [11:0] table_rom [512];
  int model_level = 0;

  ptc dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: src_step/4400 bytes per cycle (1000: one byte per 4.4 cycles)
  int src_step = 1000;
  int acc = 0;
  always @(negedge clk) begin
    acc += src_step;
    if (acc >= 4400) begin acc -= 4400; src_wr <= 1; end
    else src_wr <= 0;
  end

  // monitor
  int nrd = 0, idle = 0, cells = 0, hold_cycles = 0;
  bit collecting = 0;
  int gaps[$];
  always @(posedge clk) if (rst_n) begin
    check(int'(tx_level) == model_level, "tx level");
    if (fifo_rd) check(model_level > 0, "no read from empty FIFO");
    check(hold == (model_level == 0), "hold = empty");
    if (hold) hold_cycles++;
    model_level = model_level + (src_wr ? 1 : 0) - (fifo_rd ? 1 : 0);
    if (fifo_rd) begin
      if (nrd == 0 && cells > 0 && collecting) begin
        gaps.push_back(idle);
      end
      if (nrd == 46) begin nrd = 0; cells++; idle = 0; end
      else nrd++;
    end else begin
      if (nrd == 0) idle++;
      else check(hold, "cell bytes consecutive unless held");
    end
  end

  task automatic check_period(input int t);
    int s[$];
    gaps.delete();
    collecting = 1;
    wait (gaps.size() == 256);
    collecting = 0;
    s = gaps;
    s.sort();
    for (int i = 0; i < 256; i++)
      check(s[i] == int'(table_rom[t * 256 + i]), $sformatf("table %0d entry %0d: %0d vs %0d", t, i, s[i], table_rom[t*256+i]));
  endtask

  initial begin
    $readmemh("rtl/jitter_tables.hex", table_rom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cells == 60);
    check_period(0);
    dist_sel = 1;
    wait (cells == 320);
    check_period(1);
    // phase 2: slow source, 1 byte per 8 cycles
    src_step = 550;
    wait (cells == 620);
    check(hold_cycles > 100, "hold exercised");
    $display("hold cycles %0d", hold_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
