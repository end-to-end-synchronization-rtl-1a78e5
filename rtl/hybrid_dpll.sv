// hybrid_dpll: digital part of the hybrid adaptive clock recovery loop.
// FIFO_TRACKING counts the bytes written into the receive FIFO (wr_pulse,
// from the cell bus) minus the bytes read from it (fifo_rd), the state
// machine turns that level into UP / DOWN / reset-word requests, and the
// counter holds the word sent to the D/A converter, whose voltage (after the
// low-pass filter) steers the VCO. Each VCO tick becomes a FIFO read while
// the state machine allows reading. A tick while the FIFO is empty
// (underflow) or a byte while it is full (overflow) is a fault; resync then
// flushes the FIFO and this block's level count together.
module hybrid_dpll
  import e2e_pkg::*;
#(
  parameter int unsigned DEPTH           = 32768,
  parameter int unsigned TH_LOW          = DEPTH / 8,
  parameter int unsigned TH_HIGH         = DEPTH - DEPTH / 8,
  parameter int unsigned SAMPLE_INTERVAL = 1 << 20,
  parameter int unsigned N_AVG           = 8,
  parameter int unsigned SLOPE_TH        = 2,
  parameter int unsigned CTRL_W          = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_pulse,
  input  logic                   rd_tick,
  output logic                   fifo_rd,
  output logic                   resync,
  output logic [CTRL_W-1:0]      ctrl_word,
  output logic [$clog2(DEPTH):0] level,
  output rec_state_e             state,
  output logic                   up,
  output logic                   down,
  output logic                   fault
);
  logic              empty, full, load, reading;
  logic [CTRL_W-1:0] reset_word;

  assign fifo_rd = rd_tick && reading;
  assign fault   = (fifo_rd && empty) || (wr_pulse && full);

  fifo_track #(.DEPTH(DEPTH)) u_flt (
    .clk, .rst_n, .clear(resync), .wr_pulse, .rd_pulse(fifo_rd),
    .level, .empty, .full
  );

  hybrid_fsm #(
    .DEPTH(DEPTH), .TH_LOW(TH_LOW), .TH_HIGH(TH_HIGH),
    .SAMPLE_INTERVAL(SAMPLE_INTERVAL), .N_AVG(N_AVG), .SLOPE_TH(SLOPE_TH),
    .CTRL_W(CTRL_W)
  ) u_fsm (
    .clk, .rst_n, .level, .fault, .up, .down, .load, .reset_word, .resync,
    .reading, .state
  );

  updown_counter #(.W(CTRL_W)) u_cnt (
    .clk, .rst_n, .load, .load_word(reset_word), .up, .down, .count(ctrl_word)
  );
endmodule
