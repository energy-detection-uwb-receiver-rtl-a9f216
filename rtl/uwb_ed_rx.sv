// uwb_ed_rx: non-coherent energy-detection receiver for 2-PPM impulse-radio
// UWB, from the antenna voltage to decided bits.
//
// Signal path: LNA -> square-law module -> integrate-and-dump -> A/D
// converter -> digital back end. The back end has a time base (timing_gen),
// a pre-synchronizer, a maximum-energy search over the preamble, the 2-PPM
// decision device, the system controller and the power manager.
//
// Operation: with rx_en high the controller enters pre-synchronization and
// waits for window energies above `presync_thr`. It then sweeps the
// integration window over M preamble symbols, delaying it by (Ts/2)/(M-1)
// more each time, and locks the symbol clock to the offset that gave the
// most energy (t_synch). From then on every symbol is split into two
// half-symbol windows starting at t_synch and the bit is 0 when the first
// holds more energy. One bit leaves on demod_out per symbol period, with
// demod_valid high for one clock, about two clocks after the symbol ends.
//
// The analog blocks are behavioural models with real-valued ports, so this
// module is for simulation; every digital block below the converter is
// synthesizable on its own. The ranging block and the decoder are not part
// of this RTL: the converter samples, t_synch, the bits and their enables
// are brought out for them. The structure follows the published receiver;
// the converter placement after the integrator is the digital option it
// proposes. Port widths and all numbers not in uwb_pkg's header comment are
// this design's choices.
module uwb_ed_rx
  import uwb_pkg::*;
#(
  parameter int unsigned SYM_TICKS = SYM_TICKS_D,  // Ts in ticks
  parameter int unsigned M_SWEEPS  = M_SWEEPS_D,   // preamble repetitions
  parameter int unsigned ADC_BITS  = ADC_BITS_D,   // converter resolution
  parameter int unsigned PRE_HITS  = 3,            // pre-sync hits
  parameter real         LNA_GAIN  = 10.0,
  parameter real         SQ_GAIN   = 1.0,
  parameter real         TICK_NS   = TICK_NS_D,
  parameter real         ADC_VFS   = 1.0,
  localparam int unsigned TW = $clog2(SYM_TICKS + 1),
  localparam int unsigned MW = $clog2(M_SWEEPS + 1)
) (
  input  logic                clk,          // tick clock
  input  logic                rst_n,
  input  logic                rx_en,        // receiver enable
  input  logic                resync,       // restart acquisition
  input  logic                standby,      // power everything down
  input  real                 rf_in,        // antenna voltage
  input  logic [ADC_BITS-1:0] presync_thr,  // pre-sync threshold (code)
  output rx_state_e           state,        // controller phase
  output logic                lock,         // clock locked, demodulating
  output logic                locked_clk,   // symbol clock at t_synch
  output logic [TW-1:0]       t_synch,      // locked offset, ticks
  output logic                demod_valid,  // bit decided this cycle
  output logic                demod_out,    // decided bit
  output logic                timesweep,    // sync integration window
  output logic [TW-1:0]       delay_step,   // current sweep offset
  output logic                presync_det,  // signal detected
  output logic [ADC_BITS-1:0] adc_code,     // converter output
  output logic                adc_valid,    // converter output new
  output logic [TW-1:0]       tick,         // position in the period
  output logic [MW-1:0]       sweep_idx,    // current sweep index m
  output logic [ADC_BITS-1:0] best_e,       // maximum sweep energy
  output logic [ADC_BITS-1:0] z0,           // last first-half energy
  output logic [ADC_BITS-1:0] z1,           // last second-half energy
  output pwr_en_t             pwr_en        // block enables
);

  // ---------------- analog front end (behavioural) ----------------
  real v_lna, v_sq, v_int;
  logic dump, integ, sample, period_end;
  logic [MW-1:0] sample_tag;
  rx_state_e     sample_state;

  lna #(.GAIN(LNA_GAIN)) u_lna (
    .en(pwr_en.fe), .rf_in(rf_in), .rf_out(v_lna));

  squarer #(.K(SQ_GAIN)) u_sq (
    .en(pwr_en.fe), .v_in(v_lna), .e_out(v_sq));

  int_dump #(.DT(TICK_NS)) u_id (
    .clk(clk), .rst_n(rst_n), .en(pwr_en.integ),
    .dump(dump), .integ(integ), .e_in(v_sq), .out(v_int));

  adc #(.BITS(ADC_BITS), .VFS(ADC_VFS)) u_adc (
    .clk(clk), .rst_n(rst_n), .en(pwr_en.adc), .sample(sample),
    .vin(v_int), .code(adc_code), .valid(adc_valid));

  // ---------------- digital back end ----------------
  timing_gen #(.SYM_TICKS(SYM_TICKS), .M_SWEEPS(M_SWEEPS)) u_tg (
    .clk(clk), .rst_n(rst_n), .state(state), .t_synch(t_synch),
    .tick(tick), .period_end(period_end), .dump(dump), .integ(integ),
    .sample(sample), .sample_tag(sample_tag), .sample_state(sample_state),
    .timesweep(timesweep), .delay_step(delay_step), .sweep_idx(sweep_idx),
    .locked_clk(locked_clk));

  // The converter adds one clock: carry the window's tag along with it.
  logic [MW-1:0] tag_d;
  rx_state_e     tst_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_d <= '0;
      tst_d <= ST_IDLE;
    end else if (sample) begin
      tag_d <= sample_tag;
      tst_d <= sample_state;
    end
  end

  presync #(.BITS(ADC_BITS), .HITS(PRE_HITS)) u_pre (
    .clk(clk), .rst_n(rst_n), .en(pwr_en.presync),
    .valid(adc_valid && tst_d == ST_PRESYNC), .code(adc_code),
    .thr(presync_thr), .detect(presync_det));

  logic          sync_done, sync_found;
  logic [MW-1:0] best_m;  // equals t_synch / step; not used further

  sync_search #(.BITS(ADC_BITS), .SYM_TICKS(SYM_TICKS), .M_SWEEPS(M_SWEEPS)) u_ss (
    .clk(clk), .rst_n(rst_n),
    .clr(state == ST_IDLE || state == ST_PRESYNC),
    .valid(adc_valid && tst_d == ST_SYNC), .code(adc_code), .m_idx(tag_d),
    .done(sync_done), .found(sync_found), .best_m(best_m), .best_e(best_e),
    .t_synch(t_synch));

  decision #(.BITS(ADC_BITS)) u_dec (
    .clk(clk), .rst_n(rst_n), .en(pwr_en.demod),
    .valid(adc_valid && tst_d == ST_DEMOD), .half(tag_d[0]), .code(adc_code),
    .bit_valid(demod_valid), .bit_out(demod_out), .z0(z0), .z1(z1));

  sys_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .rx_en(rx_en), .resync(resync),
    .period_end(period_end), .presync_detect(presync_det),
    .sync_done(sync_done), .state(state), .lock(lock));

  power_mgr u_pm (
    .clk(clk), .rst_n(rst_n), .state(state), .standby(standby),
    .pwr_en(pwr_en));

  // The locked offset is always a whole sweep step inside half a symbol.
  a_tsynch_range: assert property (@(posedge clk) disable iff (!rst_n)
    sync_found |-> (t_synch <= TW'(SYM_TICKS / 2)));

endmodule
