// ptc: Programmable Transfer Control unit, the traffic intercell-interval
// generator of the test system. It reads the transmit FIFO in cells of
// CELL_BYTES bytes, one byte per Tbyte, separated by gaps whose lengths follow
// a programmed statistical distribution, emulating the delay jitter of a
// network. Inside:
//   fifo_track      transmit FIFO level; its empty flag is the Hold flag,
//   scrambler       uniform pseudo-random sequence of period 2^SCR_BITS,
//   jitter_eprom    inverse distribution function (dist_sel picks the table),
//   delay_generator counts the gap and raises Cell_Enable,
//   ptc_control     issues read pulses and frames the cell on the bus.
// The scrambler steps whenever a gap is loaded, so the EPROM has the next gap
// ready long before it is needed (prefetch: this design's choice).
// Outputs fifo_rd to the transmit FIFO; bus_wr/bus_sop come one cycle later,
// with the FIFO's registered output byte.
module ptc
  import e2e_pkg::*;
#(
  parameter int unsigned TX_DEPTH   = 1024,
  parameter int unsigned CELL_BYTES = CELL_PAYLOAD,
  parameter int unsigned SCR_BITS   = 8,
  parameter int unsigned DELAY_W    = 12,
  parameter string       EPROM_FILE = "rtl/jitter_tables.hex"
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      dist_sel,
  input  logic                      src_wr,
  output logic                      fifo_rd,
  output logic                      bus_wr,
  output logic                      bus_sop,
  output logic                      hold,
  output logic [$clog2(TX_DEPTH):0] tx_level,
  output logic [DELAY_W-1:0]        gap
);
  logic                tx_full;
  logic                next_gap, cell_enable, dg_busy;
  logic [SCR_BITS-1:0] scr_value;
  logic [DELAY_W-1:0]  td;

  fifo_track #(.DEPTH(TX_DEPTH)) u_track (
    .clk, .rst_n, .clear(1'b0), .wr_pulse(src_wr), .rd_pulse(fifo_rd),
    .level(tx_level), .empty(hold), .full(tx_full)
  );

  scrambler #(.N(SCR_BITS)) u_scr (
    .clk, .rst_n, .step(next_gap), .value(scr_value)
  );

  jitter_eprom #(.ADDR_W(SCR_BITS + 1), .DATA_W(DELAY_W), .INIT_FILE(EPROM_FILE)) u_eprom (
    .clk, .addr({dist_sel, scr_value}), .data(td)
  );

  delay_generator #(.DELAY_W(DELAY_W)) u_dly (
    .clk, .rst_n, .load(next_gap), .delay(td), .cell_enable, .busy(dg_busy)
  );

  ptc_control #(.CELL_BYTES(CELL_BYTES)) u_ctl (
    .clk, .rst_n, .cell_enable, .hold, .fifo_rd, .next_gap, .bus_wr, .bus_sop
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        gap <= '0;
    else if (next_gap) gap <= td;
  end

  // The source must not write into a full transmit FIFO (the byte would be lost).
  a_no_tx_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(src_wr && tx_full));
  // Cell_Enable only ends a running gap.
  a_enable_in_gap: assert property (@(posedge clk) disable iff (!rst_n) cell_enable |-> dg_busy);
endmodule
