// hybrid_fsm: recovery state machine of the hybrid adaptive clock recovery.
// It reads the receive FIFO level every SAMPLE_INTERVAL cycles and corrects
// the read clock through one-cycle UP / DOWN pulses to the counter:
//  - while the level lies between TH_LOW and TH_HIGH (ST_TRACK) it corrects on
//    the trend only: it sums N_AVG consecutive level differences and, at the
//    end of each set, pulses UP if their average exceeds SLOPE_TH bytes per
//    reading (buffer filling: read faster) or DOWN if it is below -SLOPE_TH;
//  - once the level is above TH_HIGH or below TH_LOW (ST_LIMIT) it corrects on
//    the absolute level only, one UP (high) or DOWN (low) per reading, and the
//    trend sum is discarded;
//  - on a fault (FIFO underflow or overflow) it pulses resync to flush the
//    buffer and enters ST_FILL, where load holds the counter at the reset
//    word (nominal frequency) and reading is off until the buffer is half
//    full. Reset also starts in ST_FILL.
// The two correction factors and the reset word follow the description; the
// thresholds, sampling interval, set size, dead band and the fill/flush
// procedure are this design's choices.
// Timing: up/down/resync are registered, one cycle after the sample or fault.
module hybrid_fsm
  import e2e_pkg::*;
#(
  parameter int unsigned DEPTH           = 32768,
  parameter int unsigned TH_LOW          = DEPTH / 8,
  parameter int unsigned TH_HIGH         = DEPTH - DEPTH / 8,
  parameter int unsigned SAMPLE_INTERVAL = 1 << 20,
  parameter int unsigned N_AVG           = 8,
  parameter int unsigned SLOPE_TH        = 2,
  parameter int unsigned CTRL_W          = 12,
  parameter logic [CTRL_W-1:0] RESET_WORD = CTRL_W'(1 << (CTRL_W - 1))
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(DEPTH):0] level,
  input  logic                   fault,
  output logic                   up,
  output logic                   down,
  output logic                   load,
  output logic [CTRL_W-1:0]      reset_word,
  output logic                   resync,
  output logic                   reading,
  output rec_state_e             state
);
  localparam int unsigned LW = $clog2(DEPTH) + 1;
  localparam int unsigned TW = $clog2(SAMPLE_INTERVAL) + 1;
  localparam int unsigned NW = $clog2(N_AVG) + 1;
  localparam int unsigned AW = LW + NW + 1;
  localparam logic signed [AW-1:0] SUM_TH = AW'(SLOPE_TH * N_AVG);

  logic [TW-1:0]          timer;
  logic [NW-1:0]          nread;
  logic [LW-1:0]          prev_level;
  logic signed [AW-1:0]   acc, diff, sum;
  logic                   sample;

  assign sample  = (state != ST_FILL) && (timer == TW'(SAMPLE_INTERVAL - 1));
  assign diff    = AW'($signed({1'b0, level})) - AW'($signed({1'b0, prev_level}));
  assign sum     = acc + diff;
  assign load       = (state == ST_FILL);
  assign reset_word = RESET_WORD;
  assign reading = (state != ST_FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_FILL;
      timer      <= '0;
      nread      <= '0;
      acc        <= '0;
      prev_level <= '0;
      up         <= 1'b0;
      down       <= 1'b0;
      resync     <= 1'b0;
    end else begin
      up     <= 1'b0;
      down   <= 1'b0;
      resync <= 1'b0;
      if (state == ST_FILL) begin
        timer <= '0;
        nread <= '0;
        acc   <= '0;
        // the level seen while the flush is pending is the stale one
        if (!resync && level >= LW'(DEPTH / 2)) begin
          state      <= ST_TRACK;
          prev_level <= level;
        end
      end else if (fault) begin
        state  <= ST_FILL;
        resync <= 1'b1;
      end else begin
        timer <= sample ? '0 : timer + 1'b1;
        if (sample) begin
          prev_level <= level;
          if (level > LW'(TH_HIGH)) begin
            state <= ST_LIMIT;
            up    <= 1'b1;
            acc   <= '0;
            nread <= '0;
          end else if (level < LW'(TH_LOW)) begin
            state <= ST_LIMIT;
            down  <= 1'b1;
            acc   <= '0;
            nread <= '0;
          end else begin
            state <= ST_TRACK;
            if (nread == NW'(N_AVG - 1)) begin
              up    <= (sum > SUM_TH);
              down  <= (sum < -SUM_TH);
              acc   <= '0;
              nread <= '0;
            end else begin
              acc   <= sum;
              nread <= nread + 1'b1;
            end
          end
        end
      end
    end
  end

  a_up_down_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(up && down));
endmodule
