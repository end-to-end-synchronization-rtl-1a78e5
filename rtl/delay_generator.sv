// delay_generator: produces the intercell gap. On load it takes the gap td
// from the EPROM data bus and counts it down; when the count is spent it
// pulses cell_enable, telling the control block that a cell starts.
// Timing: load in cycle t gives cell_enable in cycle t+td+1, so with the
// control block reading the first byte in the cell_enable cycle and having
// read the last byte of the previous cell in cycle t, exactly td idle Tbyte
// cycles separate two cells (T = Tp + td). A load while counting restarts
// the count.
module delay_generator #(
  parameter int unsigned DELAY_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [DELAY_W-1:0] delay,
  output logic               cell_enable,
  output logic               busy
);
  logic [DELAY_W-1:0] cnt;

  assign cell_enable = busy && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
    end else if (load) begin
      cnt  <= delay;
      busy <= 1'b1;
    end else if (busy) begin
      if (cnt == '0) busy <= 1'b0;
      else           cnt  <= cnt - 1'b1;
    end
  end
endmodule
