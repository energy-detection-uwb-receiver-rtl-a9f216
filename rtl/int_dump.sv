// int_dump: behavioural model of the integrate-and-dump circuit (not
// synthesizable: real-valued ports and state).
//
// Discrete-time integration, one rectangle of width DT per clock tick, as in
// the sampled ("discrete time") model of the receiver. At each rising clock
// edge: with `dump` high the integral restarts from this tick's input
// (or from zero if `integ` is low); otherwise, with `integ` high, the input
// times DT is added; with `integ` low the last value is held. So a window of
// N ticks that starts with dump+integ and keeps integ for N ticks leaves the
// sum of those N inputs on `out` after its last edge, and the value stays
// there for a sampler to read at the next edge. Powered down (en low) the
// output is cleared. Leakage and offset are not modelled.
module int_dump #(
  parameter real DT = 1.01   // integration step, ns (one tick)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // power enable
  input  logic dump,    // restart the integral at this tick
  input  logic integ,   // integrate this tick (low: hold)
  input  real  e_in,    // squared signal
  output real  out      // integral
);
  real acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= 0.0;
    else if (!en)      acc <= 0.0;
    else if (dump)     acc <= integ ? e_in * DT : 0.0;
    else if (integ)    acc <= acc + e_in * DT;
  end

  assign out = acc;
endmodule
