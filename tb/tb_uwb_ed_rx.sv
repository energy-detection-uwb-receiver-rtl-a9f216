// tb_uwb_ed_rx: end-to-end test of the receiver at its default sizes
// (Ts = 200 ticks, M = 11 sweep offsets, 8-bit converter).
//
// The testbench plays the channel: it produces the antenna voltage tick by
// tick as noise plus, for each 2-PPM symbol of a packet, a burst of Ts/2
// ticks with alternating sign starting tau ticks into the symbol (symbol 0)
// or tau + Ts/2 ticks (symbol 1). A packet is a preamble of PRE zeros and
// NDATA random bits. Ticks are counted from reset, which is also the
// receiver's free-running period start, so tau is the clock offset the
// synchronizer must find.
//
// Scenario: noise only (pre-sync must reject it), packet 1 with tau = 43 and
// little noise (the sweep must pick m = 4, t_synch = 40 ticks, the offset
// whose window overlaps the burst most, as worked out here from the burst
// position), resync, noise, packet 2 with tau = 87 and more noise
// (t_synch within two steps of 90, the
// noise being enough to move the maximum to a neighbouring offset), stand-by, and rx_en low. Every decided bit
// of a packet symbol is compared with what was sent, and bits must leave
// exactly one symbol period apart, 2 ticks after the end of their symbol.
// Each mechanism (noise rejection, detection, sweep windows, lock, locked
// clock, 0 and 1 decisions, resync, stand-by, return to idle) is counted and
// must have happened.
module tb_uwb_ed_rx;
  import uwb_pkg::*;
  localparam int SYM = SYM_TICKS_D, M = M_SWEEPS_D, HALF = SYM / 2;
  localparam int STEP = HALF / (M - 1);
  localparam int BITS = ADC_BITS_D;
  localparam int TW = $clog2(SYM + 1), MW = $clog2(M + 1);
  localparam int PRE = 20, NDATA = 32;
  localparam real A = 0.0077;           // burst amplitude at the antenna, V

  logic clk = 1'b0, rst_n = 1'b0, rx_en = 1'b0, resync = 1'b0, standby = 1'b0;
  real  rf_in = 0.0;
  logic [BITS-1:0] presync_thr = 8'd40;
  rx_state_e state;
  logic lock, locked_clk, demod_valid, demod_out, timesweep, presync_det, adc_valid;
  logic [TW-1:0] t_synch, delay_step, tick;
  logic [MW-1:0] sweep_idx;
  logic [BITS-1:0] adc_code, best_e, z0, z1;
  pwr_en_t pwr_en;

  uwb_ed_rx dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s (state=%s t_synch=%0d)", what, state.name(), t_synch);
    end
  endtask

  // ---------------- channel ----------------
  typedef struct { int start_sym; int tau; real sigma; } pkt_t;
  pkt_t pkts[2];
  bit   txbits[int];          // symbol index -> bit, for packet symbols
  int   txpkt[int];           // symbol index -> packet number
  real  sigma_now = 0.0003;

  function automatic real burst(input int t);
    int j, pos, st;
    real v;
    v = 0.0;
    for (int d = 0; d <= 1; d++) begin
      j = t / SYM - d;
      if (j >= 0 && txbits.exists(j)) begin
        pos = t - j * SYM;
        st  = pkts[txpkt[j]].tau + (txbits[j] ? HALF : 0);
        if (pos >= st && pos < st + HALF) v += ((pos % 2) ? -A : A);
      end
    end
    return v;
  endfunction

  function automatic real noise(input real sigma);
    real s;
    s = 0.0;
    for (int k = 0; k < 4; k++) s += real'($urandom_range(0, 20000)) / 10000.0 - 1.0;
    return sigma * s / 1.1547;
  endfunction

  // Window overlap with the burst of a zero symbol: the reference choice of m.
  function automatic int ref_m(input int tau);
    int best, bm, ov, lo, hi;
    best = -1; bm = 0;
    for (int m = 0; m < M; m++) begin
      lo = (m * STEP > tau) ? m * STEP : tau;
      hi = (m * STEP + HALF < tau + HALF) ? m * STEP + HALF : tau + HALF;
      ov = hi - lo;
      if (ov > best) begin best = ov; bm = m; end
    end
    return bm;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_noise_rej = 0, n_detect = 0, n_sweep_win = 0, n_lock = 0, n_lclk = 0;
  int n_bit0 = 0, n_bit1 = 0, n_resync = 0, n_standby = 0, n_idle = 0;
  int n_bits_checked = 0, n_data_checked = 0, last_bit_t = -1;
  int abs_t = 0;
  logic sb_q = 1'b0, ts_q = 1'b0, det_q = 1'b0, lock_q = 1'b0, lclk_q = 1'b0;
  rx_state_e st_q = ST_IDLE;

  initial begin : watchdog
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor, once per tick just before the rising edge
  always @(negedge clk) if (rst_n) begin
    if (timesweep && !ts_q) n_sweep_win++;
    if (presync_det && !det_q) n_detect++;
    if (lock && !lock_q) n_lock++;
    if (locked_clk && !lclk_q) n_lclk++;
    if (state == ST_IDLE && st_q != ST_IDLE) n_idle++;
    if (state == ST_PRESYNC && st_q == ST_DEMOD) n_resync++;
    if (state == ST_PRESYNC && adc_valid && !presync_det && adc_code <= presync_thr &&
        !txbits.exists(abs_t / SYM) && !txbits.exists(abs_t / SYM - 1))
      n_noise_rej++;
    if (standby && sb_q) begin   // enables are registered: one tick late
      chk(pwr_en == '0, "stand-by powers everything down");
      n_standby++;
    end
    if (demod_valid) begin
      int q;
      q = (abs_t - int'(t_synch) - 2) / SYM - 1;
      chk((abs_t - int'(t_synch) - 2) % SYM == 0, "bit leaves 2 ticks after its symbol");
      if (last_bit_t >= 0) chk(abs_t - last_bit_t == SYM, "one bit per symbol period");
      last_bit_t = abs_t;
      if (txbits.exists(q)) begin
        chk(demod_out == txbits[q], $sformatf("bit of symbol %0d", q));
        n_bits_checked++;
        if (q - pkts[txpkt[q]].start_sym >= PRE) n_data_checked++;
        if (demod_out) n_bit1++; else n_bit0++;
      end
    end
    if (!lock) last_bit_t = -1;
    sb_q = standby; ts_q = timesweep; det_q = presync_det; lock_q = lock; lclk_q = locked_clk;
    st_q = state;
  end

  task automatic run_to(input int t_end);
    while (abs_t < t_end) begin
      @(negedge clk);
      abs_t++;
      rf_in = burst(abs_t) + noise(sigma_now);
    end
  endtask

  task automatic wait_lock(input int limit, input int p);
    int t0;
    t0 = abs_t;
    while (!lock && abs_t - t0 < limit) run_to(abs_t + 1);
    chk(lock, $sformatf("packet %0d locked", p));
  endtask

  initial begin
    int m1, m2, base;
    pkts[0] = '{6, 43, 0.0003};
    pkts[1] = '{80, 87, 0.001};
    foreach (pkts[p])
      for (int j = 0; j < PRE + NDATA; j++) begin
        txbits[pkts[p].start_sym + j] = (j < PRE) ? 1'b0 : 1'($urandom_range(0, 1));
        txpkt[pkts[p].start_sym + j]  = p;
      end
    m1 = ref_m(pkts[0].tau);
    m2 = ref_m(pkts[1].tau);

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;      // tick 0 of the receiver starts here
    rx_en = 1'b1;
    rf_in = burst(0) + noise(sigma_now);

    // ---- packet 1 ----
    wait_lock(40 * SYM, 1);
    chk(int'(t_synch) == m1 * STEP, $sformatf("packet 1 t_synch = %0d", m1 * STEP));
    chk(m1 == 4, "packet 1 sweep picks m = 4");
    chk(n_sweep_win == M, "eleven sweep windows");
    chk(n_noise_rej > 0 && n_detect == 1, "noise rejected, then signal detected");
    run_to((pkts[0].start_sym + PRE + NDATA + 2) * SYM);
    // ---- resync, packet 2 with more noise ----
    sigma_now = pkts[1].sigma;
    resync = 1'b1; run_to(abs_t + 1); resync = 1'b0;
    run_to(abs_t + 2 * SYM);
    chk(state == ST_PRESYNC, "resync returns to pre-sync");
    wait_lock(40 * SYM, 2);
    chk(t_synch >= TW'((m2 - 2) * STEP) && t_synch <= TW'((m2 + 1) * STEP),
        "packet 2 t_synch within two steps");
    chk(n_sweep_win == 2 * M, "second sweep");
    run_to((pkts[1].start_sym + PRE + NDATA + 2) * SYM);
    // ---- stand-by, then switch off ----
    standby = 1'b1;
    base = abs_t;
    run_to(abs_t + 2 * SYM);
    chk(!adc_valid, "no conversions in stand-by");
    standby = 1'b0;
    rx_en = 1'b0;
    run_to(abs_t + 2 * SYM);
    chk(state == ST_IDLE && !lock, "rx_en low returns to idle");

    chk(n_data_checked == 2 * NDATA, "every data bit decided");
    chk(n_bit0 > 0 && n_bit1 > 0, "both symbols decided");
    chk(n_lclk > 0 && n_lock == 2 && n_resync == 1 && n_standby > 0 && n_idle == 1,
        "lock, locked clock, resync, stand-by, idle");
    $display("t_synch refs m=%0d,%0d; sweep windows %0d; noise windows rejected %0d; bits %0d, data bits %0d (0:%0d 1:%0d); standby ticks %0d (from %0d)",
             m1, m2, n_sweep_win, n_noise_rej, n_bits_checked, n_data_checked, n_bit0, n_bit1, n_standby, base);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
