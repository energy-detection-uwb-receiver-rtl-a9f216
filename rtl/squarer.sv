// squarer: behavioural model of the square-law module (not synthesizable:
// real-valued ports).
//
// Produces K * v^2, the instantaneous signal energy that the
// integrate-and-dump sums into z(0) and z(1). Powered down it outputs 0.
// The conversion gain K is this design's choice (1 by default).
// Combinational, no clock.
module squarer #(
  parameter real K = 1.0   // conversion gain, 1/V
) (
  input  logic en,    // power enable
  input  real  v_in,  // amplified RF voltage
  output real  e_out  // K * v_in^2
);
  assign e_out = en ? K * v_in * v_in : 0.0;
endmodule
