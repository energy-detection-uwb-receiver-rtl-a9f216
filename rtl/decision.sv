// decision: 2-PPM bit decision device.
//
// In demodulation the integrate-and-dump gives, for symbol k, the energy of
// the first half of the symbol, z0, and then of the second half, z1. The
// block holds z0 when it arrives (half = 0); when z1 arrives (half = 1) it
// decides a_k = 0 if z0 > z1 and a_k = 1 otherwise, and raises `bit_valid`
// for one cycle with the decision on `bit_out`, which then holds until the
// next symbol. A z1 without a preceding z0 is ignored. The rule follows the
// published decision equation; the digital form (comparing converter codes)
// is the implementation the receiver structure suggests. Latency: one clock
// after the z1 valid; throughput one bit per symbol period.
module decision
  import uwb_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS_D
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,        // demodulation active; low clears
  input  logic            valid,     // new half-symbol energy
  input  logic            half,      // 0: z0, 1: z1
  input  logic [BITS-1:0] code,      // energy
  output logic            bit_valid, // decision made this cycle
  output logic            bit_out,   // decided symbol a_k
  output logic [BITS-1:0] z0,        // held first-half energy
  output logic [BITS-1:0] z1         // held second-half energy
);
  logic have_z0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_z0   <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      z0        <= '0;
      z1        <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (!en) begin
        have_z0 <= 1'b0;
      end else if (valid && !half) begin
        z0      <= code;
        have_z0 <= 1'b1;
      end else if (valid && half && have_z0) begin
        z1        <= code;
        bit_out   <= !(z0 > code);
        bit_valid <= 1'b1;
        have_z0   <= 1'b0;
      end
    end
  end
endmodule
