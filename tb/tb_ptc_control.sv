// tb_ptc_control: drives the control block with a model delay generator
// (cell_enable td+1 cycles after next_gap) and a random Hold flag. Checks:
// 47 read pulses per cell, none while Hold, next_gap on the last read, the
// bus strobes one cycle after the reads with start-of-cell on the first, and
// exactly td idle cycles between cells when Hold is low.
module tb_ptc_control;
  logic clk = 0, rst_n = 0, cell_enable = 0, hold = 0;
  logic fifo_rd, next_gap, bus_wr, bus_sop;
  int checks = 0, failures = 0;
  int cells = 0, nrd = 0, held_reads = 0, exact_gaps = 0;
  int td_q[$];
  logic prev_rd = 0, prev_first = 0;

  ptc_control #(.CELL_BYTES(47)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model delay generator
  initial begin
    int td;
    forever begin
      @(posedge clk);
      if (rst_n && next_gap) begin
        td = 20 + int'($urandom % 60);
        td_q.push_back(td);
        repeat (td) @(posedge clk);
        #1 cell_enable = 1;
        @(posedge clk);
        #1 cell_enable = 0;
      end
    end
  end

  // random hold in some cells
  always @(negedge clk) hold <= (cells % 3 == 1) ? (($urandom % 4) == 0) : 1'b0;

  // monitor
  int idle = 0, last_td = -1;
  bit hold_seen = 0;
  always @(posedge clk) if (rst_n) begin
    check(bus_wr == prev_rd, "bus_wr follows read");
    check(bus_sop == (prev_rd && prev_first), "bus_sop on first byte");
    if (hold) check(!fifo_rd, "no read while hold");
    prev_first <= fifo_rd && (nrd == 0);
    prev_rd    <= fifo_rd;
    if (fifo_rd) begin
      if (nrd == 0 && last_td >= 0) begin
        if (!hold_seen) begin
          check(idle == last_td, $sformatf("gap %0d expected %0d", idle, last_td));
          exact_gaps++;
        end
      end
      check(next_gap == (nrd == 46), "next_gap on last byte");
      if (nrd == 46) begin
        nrd = 0; cells++; idle = 0; hold_seen = 0;
        last_td = td_q.size() > 0 ? td_q[td_q.size()-1] : -1;
      end else nrd++;
    end else begin
      if (hold) held_reads++;
      if (hold) hold_seen = 1;
      if (nrd == 0) idle++;
      else check(hold, "cell only paused by hold");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cells == 60);
    @(posedge clk);
    check(exact_gaps > 20, "exact gaps observed");
    check(held_reads > 10, "hold exercised");
    $display("cells %0d exact gaps %0d held %0d", cells, exact_gaps, held_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
