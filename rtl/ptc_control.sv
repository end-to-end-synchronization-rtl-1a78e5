// ptc_control: Control block of the Programmable Transfer Control unit.
// After reset it waits INIT_WAIT cycles (EPROM output settling), then asks
// for the first gap. On cell_enable it issues CELL_BYTES read pulses to the
// transmit FIFO, one per Tbyte cycle, skipping any cycle in which Hold (FIFO
// empty) is set, so an empty FIFO delays the read pulses and stretches the
// cell. The cycle of the last read pulse also pulses next_gap, which loads
// the delay generator and steps the scrambler. bus_wr and bus_sop are the
// read pulse and first-byte marker delayed one cycle, aligned with the
// registered FIFO output.
module ptc_control #(
  parameter int unsigned CELL_BYTES = 47,
  parameter int unsigned INIT_WAIT  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cell_enable,
  input  logic hold,
  output logic fifo_rd,
  output logic next_gap,
  output logic bus_wr,
  output logic bus_sop
);
  typedef enum logic [1:0] {C_INIT, C_GAP, C_SEND} ctl_state_e;

  localparam int unsigned CW = $clog2(CELL_BYTES + 1);

  ctl_state_e    state;
  logic [CW-1:0] nbytes;
  logic [1:0]    wait_cnt;
  logic          sending;

  assign sending  = (state == C_SEND) || (state == C_GAP && cell_enable);
  assign fifo_rd  = sending && !hold;
  assign next_gap = ((state == C_INIT) && (wait_cnt == 2'(INIT_WAIT))) ||
                    (fifo_rd && nbytes == CW'(CELL_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_INIT;
      nbytes   <= '0;
      wait_cnt <= '0;
      bus_wr   <= 1'b0;
      bus_sop  <= 1'b0;
    end else begin
      bus_wr  <= fifo_rd;
      bus_sop <= fifo_rd && (nbytes == '0);
      case (state)
        C_INIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (next_gap) state <= C_GAP;
        end
        C_GAP: if (cell_enable) state <= C_SEND;
        default: ;
      endcase
      if (fifo_rd) begin
        if (nbytes == CW'(CELL_BYTES - 1)) begin
          nbytes <= '0;
          state  <= C_GAP;
        end else begin
          nbytes <= nbytes + 1'b1;
          state  <= C_SEND;
        end
      end
    end
  end

  // A new gap is only requested outside a cell.
  a_gap_outside_cell: assert property (@(posedge clk) disable iff (!rst_n)
    cell_enable |-> state != C_SEND);
endmodule
