// fifo_track: FIFO level tracking (FIFO_TRACK in the transfer control unit,
// FLT / FIFO_TRACKING at the receiver). It keeps the difference between the
// number of write and read pulses of a FIFO, i.e. its current occupancy.
// A pulse is counted only if the FIFO accepts it (no write while full, no
// read while empty), so the count always equals the FIFO's own fill. The
// empty flag is the transmitter's Hold flag. clear returns the level to zero
// together with a FIFO flush. The level changes one cycle after the pulses.
module fifo_track #(
  parameter int unsigned DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr_pulse,
  input  logic                     rd_pulse,
  output logic [$clog2(DEPTH):0]   level,
  output logic                     empty,
  output logic                     full
);
  localparam int unsigned LW = $clog2(DEPTH) + 1;
  logic inc, dec;

  assign empty = (level == '0);
  assign full  = (level == LW'(DEPTH));
  assign inc   = wr_pulse && !full;
  assign dec   = rd_pulse && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            level <= '0;
    else if (clear)        level <= '0;
    else if (inc && !dec)  level <= level + 1'b1;
    else if (dec && !inc)  level <= level - 1'b1;
  end
endmodule
