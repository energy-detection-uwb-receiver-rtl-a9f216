// sys_ctrl: system controller. Sequences the receiver through its phases:
// idle, pre-synchronization, preamble sweep (synchronization) and
// demodulation on the locked clock.
//
//   ST_IDLE    -> ST_PRESYNC  rx_en high
//   ST_PRESYNC -> ST_SYNC     the pre-synchronizer has detected signal
//   ST_SYNC    -> ST_DEMOD    the maximum search has delivered t_synch
//   ST_DEMOD   -> ST_PRESYNC  resync requested (e.g. next packet)
//   any        -> ST_IDLE     rx_en low
// Every change takes effect at a period boundary (`period_end`, last tick
// of the symbol), so that the time base always starts a phase at tick 0.
// Events seen in the middle of a period are remembered until its end.
// `lock` is high in demodulation. The phase order follows the published
// synchronization procedure; the resync input and the boundary rule are
// this design's own.
module sys_ctrl
  import uwb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rx_en,          // receiver enabled by the MAC
  input  logic      resync,         // restart acquisition
  input  logic      period_end,     // last tick of a symbol period
  input  logic      presync_detect, // signal present
  input  logic      sync_done,      // t_synch found
  output rx_state_e state,
  output logic      lock            // demodulating on the locked clock
);
  rx_state_e state_n;
  logic      ev_q, ev_n;   // pending event for the current phase

  always_comb begin
    state_n = state;
    ev_n    = ev_q;
    unique case (state)
      ST_IDLE:    ev_n = rx_en;
      ST_PRESYNC: ev_n = ev_q || presync_detect;
      ST_SYNC:    ev_n = ev_q || sync_done;
      ST_DEMOD:   ev_n = ev_q || resync;
      default:    ;
    endcase
    if (period_end) begin
      if (!rx_en) state_n = ST_IDLE;
      else if (ev_n) begin
        unique case (state)
          ST_IDLE:    state_n = ST_PRESYNC;
          ST_PRESYNC: state_n = ST_SYNC;
          ST_SYNC:    state_n = ST_DEMOD;
          ST_DEMOD:   state_n = ST_PRESYNC;
          default:    state_n = ST_IDLE;
        endcase
      end
      if (state_n != state) ev_n = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      ev_q  <= 1'b0;
    end else begin
      state <= state_n;
      ev_q  <= ev_n;
    end
  end

  assign lock = (state == ST_DEMOD);
endmodule
