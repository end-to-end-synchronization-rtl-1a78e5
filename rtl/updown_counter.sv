// updown_counter: the counter between the recovery state machine and the
// D/A converter. UP increments and DOWN decrements the word (raising or
// lowering the read clock); load sets it to the reset word, the nominal
// frequency. The word saturates at 0 and 2^W-1 so the recovered frequency
// stays inside the VCO's nominal range. load_word is the reset word supplied
// by the state machine; load has priority; UP and DOWN together cancel. The
// word changes one cycle after the request. After reset the counter holds
// RESET_WORD. Width and reset value are this design's choice (mid-scale =
// nominal frequency).
module updown_counter #(
  parameter int unsigned   W          = 12,
  parameter logic [W-1:0]  RESET_WORD = W'(1 << (W - 1))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_word,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                count <= RESET_WORD;
    else if (load)                             count <= load_word;
    else if (up && !down && count != '1)       count <= count + 1'b1;
    else if (down && !up && count != '0)       count <= count - 1'b1;
  end
endmodule
