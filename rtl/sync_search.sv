// sync_search: maximum-energy search of the preamble sweep.
//
// During the synchronization phase the same symbol is received M times; in
// repetition m the window starts t_off(m) = m * (Ts/2)/(M-1) after the start
// of the period and its energy is converted. This block keeps the largest
// energy seen and the m it came from; when the sample of m = M-1 arrives it
// raises `done` for one cycle and presents t_synch = t_off(best m) in ticks,
// held until `clr`. A later sample must be strictly larger to win, so on a
// tie the earliest offset is kept (integration then does not start in the
// middle of a pulse). The search rule is the published one; the tie rule,
// the tick units and the one-cycle latency are this design's own.
module sync_search
  import uwb_pkg::*;
#(
  parameter int unsigned BITS      = ADC_BITS_D,
  parameter int unsigned SYM_TICKS = SYM_TICKS_D,
  parameter int unsigned M_SWEEPS  = M_SWEEPS_D,
  localparam int unsigned STEP = (SYM_TICKS / 2) / (M_SWEEPS - 1),
  localparam int unsigned TW   = $clog2(SYM_TICKS + 1),
  localparam int unsigned MW   = $clog2(M_SWEEPS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,       // forget the previous result
  input  logic            valid,     // sweep energy available
  input  logic [BITS-1:0] code,      // energy of repetition m_idx
  input  logic [MW-1:0]   m_idx,     // sweep index of this energy
  output logic            done,      // search finished (one cycle)
  output logic            found,     // a t_synch is held
  output logic [MW-1:0]   best_m,    // m of the maximum
  output logic [BITS-1:0] best_e,    // maximum energy
  output logic [TW-1:0]   t_synch    // best_m * STEP, ticks
);
  logic [MW-1:0]   bm_n;
  logic [BITS-1:0] be_n;
  logic            take;

  assign take = (m_idx == '0) || (code > best_e);
  assign bm_n = take ? m_idx : best_m;
  assign be_n = take ? code  : best_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      found   <= 1'b0;
      best_m  <= '0;
      best_e  <= '0;
      t_synch <= '0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        found   <= 1'b0;
        best_m  <= '0;
        best_e  <= '0;
        t_synch <= '0;
      end else if (valid && !found) begin
        best_m <= bm_n;
        best_e <= be_n;
        if (m_idx == MW'(M_SWEEPS - 1)) begin
          done    <= 1'b1;
          found   <= 1'b1;
          t_synch <= TW'(bm_n) * TW'(STEP);
        end
      end
    end
  end
endmodule
