// presync: pre-synchronizer. Tells periods with signal present from periods
// of noise only, before the preamble sweep starts.
//
// During the pre-synchronization phase the integrate-and-dump measures the
// energy of consecutive half-symbol windows. Each converted window energy is
// compared with a programmable threshold `thr`. A window above threshold is a
// hit; two windows in a row below threshold (a whole symbol without energy)
// clear the hit count. `detect` rises once HITS hits have been counted and
// stays high until `en` is dropped. With 2-PPM, a pulse lands in one of the
// two halves of every symbol, so a preamble keeps the count growing while
// noise alone, below threshold, keeps clearing it. Telling signal from noise
// is the published function of the block; the threshold test and hit count
// are this design's way of doing it. Timing: `detect` rises on the clock
// edge after the valid that completes the count.
module presync
  import uwb_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS_D,  // converter code width
  parameter int unsigned HITS = 3            // hits needed to declare signal
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,      // active (pre-sync phase); low clears
  input  logic            valid,   // new window energy
  input  logic [BITS-1:0] code,    // window energy
  input  logic [BITS-1:0] thr,     // detection threshold
  output logic            detect   // signal present
);
  localparam int unsigned CW = $clog2(HITS + 1);

  logic [CW-1:0] hits_q;
  logic          quiet_q;   // previous window was below threshold

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits_q  <= '0;
      quiet_q <= 1'b0;
      detect  <= 1'b0;
    end else if (!en) begin
      hits_q  <= '0;
      quiet_q <= 1'b0;
      detect  <= 1'b0;
    end else if (valid && !detect) begin
      if (code > thr) begin
        quiet_q <= 1'b0;
        if (hits_q == CW'(HITS - 1)) detect <= 1'b1;
        hits_q <= hits_q + 1'b1;
      end else begin
        quiet_q <= 1'b1;
        if (quiet_q) hits_q <= '0;
      end
    end
  end
endmodule
