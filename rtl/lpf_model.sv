// lpf_model: BEHAVIOURAL MODEL (not synthesizable) of the analog low-pass
// filter between the D/A converter and the VCO, which smooths the voltage
// steps between successive counter words. It is a first-order RC filter with
// cutoff FC_HZ, evaluated once per clk period (sample rate F_SAMPLE_HZ):
// vout += ALPHA * (vin - vout), ALPHA = 1 - exp(-2*pi*FC_HZ/F_SAMPLE_HZ).
// Reset sets the output to V_INIT. The filter order and cutoff are this
// design's choices.
module lpf_model #(
  parameter real FC_HZ       = 100.0,
  parameter real F_SAMPLE_HZ = 19.44e6,
  parameter real V_INIT      = 0.5
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output real  vout
);
  localparam real PI    = 3.14159265358979;
  localparam real ALPHA = 1.0 - $exp(-2.0 * PI * FC_HZ / F_SAMPLE_HZ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vout <= V_INIT;
    else        vout <= vout + ALPHA * (vin - vout);
  end
endmodule
