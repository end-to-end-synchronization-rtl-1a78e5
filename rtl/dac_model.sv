// dac_model: BEHAVIOURAL MODEL (not synthesizable) of the D/A converter that
// turns the recovery counter word into the VCO control voltage. It is an
// ideal unipolar converter, vout = VREF * word / 2^W volts, with no settling
// time, glitches or non-linearity; mid-scale (the reset word) gives VREF/2,
// the VCO's centre voltage. Width and reference are this design's choices.
module dac_model #(
  parameter int unsigned W    = 12,
  parameter real         VREF = 1.0
) (
  input  logic [W-1:0] word,
  output real          vout
);
  always_comb vout = VREF * real'(word) / real'(2.0 ** W);
endmodule
