// vco_model: BEHAVIOURAL MODEL (not synthesizable) of the voltage-controlled
// oscillator that produces the receiver's read (service byte) clock. Tuning
// is linear over 0..VREF: f = F_CENTER_HZ * (1 + PPM_RANGE*1e-6*(2*vctrl/VREF-1)),
// so VREF/2 gives the nominal frequency and the ends give +-PPM_RANGE ppm
// (the nominal output range fo +-20 ppm). The control voltage is clamped to
// 0..VREF. The oscillator phase is a real-valued accumulator advanced by
// f/F_SYS_HZ on each clk (the network byte clock, which must be faster than
// f): tick pulses for one clk cycle each time the phase wraps, i.e. once per
// output period, and clk_out is the output clock as sampled by clk.
// freq_hz reports the present frequency for monitoring.
module vco_model #(
  parameter real F_CENTER_HZ = 4.296e6,
  parameter real PPM_RANGE   = 20.0,
  parameter real VREF        = 1.0,
  parameter real F_SYS_HZ    = 19.44e6
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vctrl,
  output logic clk_out,
  output logic tick,
  output real  freq_hz
);
  real v, phase, nxt;

  always_comb begin
    v = vctrl;
    if (v < 0.0)  v = 0.0;
    if (v > VREF) v = VREF;
    freq_hz = F_CENTER_HZ * (1.0 + PPM_RANGE * 1.0e-6 * (2.0 * v / VREF - 1.0));
    nxt     = phase + freq_hz / F_SYS_HZ;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 0.0;
      tick    <= 1'b0;
      clk_out <= 1'b0;
    end else begin
      tick    <= (nxt >= 1.0);
      phase   <= (nxt >= 1.0) ? nxt - 1.0 : nxt;
      clk_out <= ((nxt >= 1.0) ? nxt - 1.0 : nxt) < 0.5;
    end
  end
endmodule
