// adc: behavioural model of the A/D converter placed after the
// integrate-and-dump (not synthesizable: real-valued input).
//
// On a rising clock edge with `sample` high the held integral is converted to
// an unsigned BITS-bit code, floor(vin / VFS * 2^BITS), clipped to
// [0, 2^BITS-1], and `valid` is raised for one cycle with the new code: one
// cycle of latency. Placing a converter after the integrator so that the
// decision and the maximum search are digital follows the published receiver
// structure; the resolution and full scale are this design's choices.
module adc #(
  parameter int unsigned BITS = 8,     // resolution
  parameter real         VFS  = 1.0    // full-scale input
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,      // power enable
  input  logic            sample,  // convert at this edge
  input  real             vin,     // integrator output
  output logic [BITS-1:0] code,    // conversion result
  output logic            valid    // code is new this cycle
);
  localparam real LEVELS = real'(2 ** BITS);

  function automatic logic [BITS-1:0] quantize(input real v);
    real x;
    x = v / VFS * LEVELS;
    if (x <= 0.0)              return '0;
    else if (x >= LEVELS - 1.0) return '1;
    else                       return BITS'($rtoi(x));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en && sample;
      if (en && sample) code <= quantize(vin);
    end
  end
endmodule
