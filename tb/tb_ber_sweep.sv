// tb_ber_sweep: bit error rate of the complete receiver against noise level.
//
// The testbench plays a multipath-like channel: each 2-PPM pulse arrives as
// 60 ticks (about 60 ns) of exponentially decaying taps (decay constant 20
// ticks) with random signs, starting tau = 43 ticks into the symbol, or
// Ts/2 later for a 1. Gaussian-like noise of standard deviation sigma is
// added at the antenna. For each of five noise levels the receiver is
// switched off and on again and goes through the whole acquisition:
// pre-sync (threshold set from the expected noise energy), the 11-step
// sweep and lock. It then decodes 400 random data bits after a 30-symbol
// preamble. The converter full scale is raised to 4 so that noise energy does
// not clip. Checked: lock at every level, no errors at the lowest noise,
// and errors at the two highest noise levels. The bit error
// rate of each level is printed with its Eb/N0.
module tb_ber_sweep;
  import uwb_pkg::*;
  localparam int SYM = SYM_TICKS_D, HALF = SYM / 2;
  localparam int BITS = ADC_BITS_D;
  localparam int TW = $clog2(SYM + 1), MW = $clog2(M_SWEEPS_D + 1);
  localparam int PRE = 30, NDATA = 400, GAP = 4, NPTS = 5;
  localparam int TAPS = 60, TAU = 43;
  localparam real GAIN = 10.0, VFS = 6.0, DT = 1.01;
  localparam real A = 0.0077 * 3.09 * 1.6;   // window energy about 1.5

  logic clk = 1'b0, rst_n = 1'b0, rx_en = 1'b0, resync = 1'b0, standby = 1'b0;
  real  rf_in = 0.0;
  logic [BITS-1:0] presync_thr = '1;
  rx_state_e state;
  logic lock, locked_clk, demod_valid, demod_out, timesweep, presync_det, adc_valid;
  logic [TW-1:0] t_synch, delay_step, tick;
  logic [MW-1:0] sweep_idx;
  logic [BITS-1:0] adc_code, best_e, z0, z1;
  pwr_en_t pwr_en;

  uwb_ed_rx #(.ADC_VFS(VFS)) dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  real h[TAPS];
  real sigmas[NPTS] = '{0.003, 0.008, 0.011, 0.014, 0.017};
  real sigma_now = 0.0;
  bit  txbits[int];
  int  pkt_start = 0;
  int  abs_t = 0;
  int  errs = 0, nbits = 0;

  function automatic real chan(input int t);
    int j, pos, st;
    real v;
    v = 0.0;
    for (int d = 0; d <= 1; d++) begin
      j = t / SYM - d;
      if (j >= 0 && txbits.exists(j)) begin
        pos = t - j * SYM;
        st  = TAU + (txbits[j] ? HALF : 0);
        if (pos >= st && pos < st + TAPS) v += h[pos - st];
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

  task automatic run_to(input int t_end);
    while (abs_t < t_end) begin
      @(negedge clk);
      abs_t++;
      rf_in = chan(abs_t) + noise(sigma_now);
    end
  endtask

  // decided bits of data symbols, located from their output time
  always @(negedge clk) if (rst_n && demod_valid) begin
    int q;
    q = (abs_t - int'(t_synch) - 2) / SYM - 1;
    if (txbits.exists(q) && q >= pkt_start + PRE) begin
      nbits++;
      if (demod_out != txbits[q]) errs++;
    end
  end

  initial begin : watchdog
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eb, n0, nmean, nstd, thr;
    int  e_first, e_last, t0;
    e_last = 0;
    eb = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      h[n] = A * $exp(-real'(n) / 20.0) * (($urandom_range(0, 1) != 0) ? 1.0 : -1.0);
      eb += h[n] * h[n] * DT;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    e_first = 0;
    for (int p = 0; p < NPTS; p++) begin
      sigma_now = sigmas[p];
      // noise energy of one window after the LNA, in converter codes
      nmean = real'(HALF) * (GAIN * sigma_now) ** 2 * DT / VFS * 256.0;
      nstd  = nmean * $sqrt(2.0 / real'(HALF));
      thr   = nmean + 3.0 * nstd + 2.0;
      presync_thr = (thr > 250.0) ? 8'd250 : BITS'($rtoi(thr));
      rx_en = 1'b0;
      run_to(abs_t + 2 * SYM);
      rx_en = 1'b1;
      pkt_start = abs_t / SYM + GAP;
      txbits.delete();
      for (int j = 0; j < PRE + NDATA; j++)
        txbits[pkt_start + j] = (j < PRE) ? 1'b0 : 1'($urandom_range(0, 1));
      errs = 0; nbits = 0;
      t0 = abs_t;
      while (!lock && abs_t - t0 < (GAP + PRE + 4) * SYM) run_to(abs_t + 1);
      chk(lock, $sformatf("lock at sigma %g", sigma_now));
      run_to((pkt_start + PRE + NDATA + 2) * SYM);
      chk(nbits == NDATA, "every data bit decided");
      n0 = 2.0 * sigma_now * sigma_now * DT;   // two-sided density N0/2 = sigma^2 * tick
      $display("sigma %6.4f V  Eb/N0 %5.1f dB  t_synch %0d  threshold %0d  errors %0d / %0d  BER %g",
               sigma_now, 10.0 * $log10(eb / n0), t_synch, presync_thr, errs, nbits,
               real'(errs) / real'(nbits));
      if (p == 0) e_first = errs;
      if (p >= NPTS - 2) e_last += errs;
    end
    chk(e_first == 0, "no errors at the lowest noise");
    chk(e_last > e_first, "errors appear at the two highest noise levels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
