// timing_gen: local time base of the receiver. It produces the
// integrate-and-dump controls, the converter's sampling strobe, the
// preamble "time sweep" of the synchronizer and the locked clock.
//
// A tick counter t runs freely from reset over one symbol period
// (SYM_TICKS ticks, Ts). Every window lasts HALF = SYM_TICKS/2 ticks (Ts/2):
// a window starts with `dump` and `integ` high, keeps `integ` high for HALF
// ticks, and one tick after its last tick `sample` is raised so that the
// converter reads the held integral. What the windows are depends on the
// phase given by the system controller:
//   ST_PRESYNC  back-to-back half-symbol windows at t = 0 and t = HALF.
//   ST_SYNC     one window per period m = 0..M-1, starting at
//               t_off(m) = m * STEP with STEP = HALF/(M-1), i.e. the window
//               slides by (Ts/2)/(M-1) every repetition; after it the
//               integral is held until sampled ("hold phase").
//   ST_DEMOD    back-to-back windows at t = t_synch (z0, first half of the
//               symbol) and t = t_synch + HALF (z1, second half); the locked
//               clock is high during the first half.
//   ST_IDLE     nothing.
// Windows of the continuous phases are armed by their first dump, so no
// sample is taken of a partial window after a phase change.
// `sample_tag` travels with `sample`: the sweep index m in ST_SYNC, the half
// (0 or 1) otherwise; `sample_state` is the phase the window belonged to.
// `period_end` is high on the last tick of each period; the controller
// changes phase only there. The sweep schedule, window length and locked
// clock follow the published synchronizer; the tick resolution, arming rule
// and tag outputs are this design's own.
module timing_gen
  import uwb_pkg::*;
#(
  parameter int unsigned SYM_TICKS = SYM_TICKS_D,
  parameter int unsigned M_SWEEPS  = M_SWEEPS_D,
  localparam int unsigned HALF = SYM_TICKS / 2,
  localparam int unsigned STEP = HALF / (M_SWEEPS - 1),
  localparam int unsigned TW   = $clog2(SYM_TICKS + 1),
  localparam int unsigned MW   = $clog2(M_SWEEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rx_state_e     state,        // phase from the system controller
  input  logic [TW-1:0] t_synch,      // locked offset, 0..HALF ticks
  output logic [TW-1:0] tick,         // position inside the period
  output logic          period_end,   // last tick of the period
  output logic          dump,         // restart the integral
  output logic          integ,        // integrate this tick
  output logic          sample,       // converter strobe
  output logic [MW-1:0] sample_tag,   // sweep index or half of the sample
  output rx_state_e     sample_state, // phase the sample belongs to
  output logic          timesweep,    // sync integration window
  output logic [TW-1:0] delay_step,   // current sweep offset t_off(m)
  output logic [MW-1:0] sweep_idx,    // current m
  output logic          locked_clk    // symbol clock aligned to t_synch
);

  initial begin
    assert (SYM_TICKS % 2 == 0)
      else $error("timing_gen: SYM_TICKS must be even");
    assert (M_SWEEPS >= 2 && HALF % (M_SWEEPS - 1) == 0)
      else $error("timing_gen: Ts/2 must split into M-1 whole steps");
  end

  logic [TW-1:0] t_q;
  logic [MW-1:0] m_q;
  logic          armed_q;
  rx_state_e     st_prev_q;
  logic          sample_q;
  logic [MW-1:0] tag_q;
  rx_state_e     sst_q;

  logic [TW-1:0] off, a_start, b_start, a_last, b_last;
  logic          win_last, changed;
  logic [MW-1:0] tag_n;

  assign off     = TW'(m_q) * TW'(STEP);
  assign a_start = t_synch;
  assign b_start = (t_synch + TW'(HALF) >= TW'(SYM_TICKS)) ?
                   t_synch + TW'(HALF) - TW'(SYM_TICKS) : t_synch + TW'(HALF);
  assign a_last  = (a_start == '0) ? TW'(SYM_TICKS - 1) : a_start - 1'b1;
  assign b_last  = (b_start == '0) ? TW'(SYM_TICKS - 1) : b_start - 1'b1;
  assign changed = (state != st_prev_q);

  always_comb begin
    dump     = 1'b0;
    integ    = 1'b0;
    win_last = 1'b0;
    tag_n    = '0;
    unique case (state)
      ST_PRESYNC: begin
        integ    = 1'b1;
        dump     = (t_q == '0) || (t_q == TW'(HALF));
        win_last = (t_q == TW'(HALF - 1)) || (t_q == TW'(SYM_TICKS - 1));
        tag_n    = (t_q == TW'(HALF - 1)) ? MW'(0) : MW'(1);
      end
      ST_SYNC: begin
        if (m_q < MW'(M_SWEEPS)) begin
          integ    = (t_q >= off) && (t_q < off + TW'(HALF));
          dump     = (t_q == off);
          win_last = (t_q == off + TW'(HALF - 1));
        end
        tag_n = m_q;
      end
      ST_DEMOD: begin
        integ    = 1'b1;
        dump     = (t_q == a_start) || (t_q == b_start);
        win_last = (t_q == b_last) || (t_q == a_last);
        tag_n    = (t_q == b_last) ? MW'(0) : MW'(1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q       <= '0;
      m_q       <= '0;
      armed_q   <= 1'b0;
      st_prev_q <= ST_IDLE;
      sample_q  <= 1'b0;
      tag_q     <= '0;
      sst_q     <= ST_IDLE;
    end else begin
      t_q       <= (t_q == TW'(SYM_TICKS - 1)) ? '0 : t_q + 1'b1;
      st_prev_q <= state;
      if (state != ST_SYNC)
        m_q <= '0;
      else if (period_end && m_q < MW'(M_SWEEPS))
        m_q <= m_q + 1'b1;
      if (dump)         armed_q <= 1'b1;
      else if (changed) armed_q <= 1'b0;
      sample_q <= win_last && armed_q && !changed;
      if (win_last) begin
        tag_q <= tag_n;
        sst_q <= state;
      end
    end
  end

  assign tick         = t_q;
  assign period_end   = (t_q == TW'(SYM_TICKS - 1));
  assign sample       = sample_q;
  assign sample_tag   = tag_q;
  assign sample_state = sst_q;
  assign timesweep    = (state == ST_SYNC) && integ;
  assign delay_step   = (state == ST_SYNC) ? off : '0;
  assign sweep_idx    = m_q;
  assign locked_clk   = (state == ST_DEMOD) &&
                        ((b_start > a_start) ? (t_q >= a_start && t_q < b_start)
                                             : (t_q >= a_start || t_q < b_start));

endmodule
