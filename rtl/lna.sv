// lna: behavioural model of the low-noise amplifier (not synthesizable:
// real-valued ports).
//
// The received RF voltage is multiplied by a fixed gain while the amplifier
// is powered; powered down, its output is 0 V. Noise figure, bandwidth and
// non-linearity are not modelled, as in the first refinement step of the
// receiver where all non-ideal effects are switched off. The gain value is
// this design's choice; only the block itself is part of the published
// receiver structure. Combinational, no clock.
module lna #(
  parameter real GAIN = 10.0   // voltage gain
) (
  input  logic en,       // power enable from the power manager
  input  real  rf_in,    // antenna voltage, V
  output real  rf_out    // amplified voltage, V
);
  assign rf_out = en ? GAIN * rf_in : 0.0;
endmodule
