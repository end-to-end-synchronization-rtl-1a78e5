// scrambler: uniform pseudo-random address generator for the jitter EPROM.
// The description asks for a shift-register sequence of period 2^n. A
// maximal-length Fibonacci LFSR visits 2^n-1 states; the feedback is
// inverted whenever the n-1 low bits are all zero, which splices the
// all-zero state into the cycle (a de Bruijn counter), so every n-bit value
// appears exactly once per period of 2^n. The value advances one step on each
// cycle with step high. n (N) is this design's choice; taps are given for
// N = 4..16. Reset value: 1.
module scrambler #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] value
);
  // Feedback taps (bit positions counted from 1) of maximal-length LFSRs.
  function automatic logic [15:0] taps(int unsigned n);
    logic [15:0] t;
    case (n)
      4:  t = 16'h000C;  // 4,3
      5:  t = 16'h0014;  // 5,3
      6:  t = 16'h0030;  // 6,5
      7:  t = 16'h0060;  // 7,6
      8:  t = 16'h00B8;  // 8,6,5,4
      9:  t = 16'h0110;  // 9,5
      10: t = 16'h0240;  // 10,7
      11: t = 16'h0500;  // 11,9
      12: t = 16'h0829;  // 12,6,4,1
      13: t = 16'h100D;  // 13,4,3,1
      14: t = 16'h2015;  // 14,5,3,1
      15: t = 16'h6000;  // 15,14
      default: t = 16'hD008;  // 16,15,13,4
    endcase
    return t;
  endfunction

  localparam logic [15:0]  TAP_ROW = taps(N);
  localparam logic [N-1:0] TAPS    = TAP_ROW[N-1:0];
  logic fb;

  assign fb = (^(value & TAPS)) ^ (value[N-2:0] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= N'(1);
    else if (step) value <= {value[N-2:0], fb};
  end

  initial begin
    assert (N >= 4 && N <= 16) else $error("scrambler: N must be 4..16");
  end
endmodule
