// tb_timing_gen: self-checking test of the receiver time base.
//
// Drives the phase input through idle, pre-sync, a full preamble sweep and
// demodulation at three locked offsets (0, 40 and HALF ticks), changing phase
// only at period boundaries as the controller does. For every phase the
// expected dump, integrate and sample instants are listed in absolute ticks
// from the window rules (pre-sync: windows every Ts/2; sweep: window m starts
// m*Ts + m*(Ts/2)/(M-1) after the phase start; demodulation: windows every
// Ts/2 from t_synch) and compared tick by tick with the outputs, together with
// the sample tags, the period marker and the locked clock.
module tb_timing_gen;
  import uwb_pkg::*;

  localparam int SYM  = SYM_TICKS_D;
  localparam int M    = M_SWEEPS_D;
  localparam int HALF = SYM / 2;
  localparam int STEP = HALF / (M - 1);
  localparam int TW   = $clog2(SYM + 1);
  localparam int MW   = $clog2(M + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  rx_state_e state = ST_IDLE;
  logic [TW-1:0] t_synch = '0;
  logic [TW-1:0] tick, delay_step;
  logic period_end, dump, integ, sample, timesweep, locked_clk;
  logic [MW-1:0] sample_tag, sweep_idx;
  rx_state_e sample_state;

  timing_gen dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sync_win = 0, n_demod_samp = 0, n_pre_samp = 0, n_lck = 0;

  bit exp_dump[int];
  bit exp_integ[int];
  int exp_tag[int];
  rx_state_e exp_sst[int];

  typedef struct { rx_state_e st; int periods; int ts; } phase_t;
  phase_t ph[$];

  task automatic chk(input bit cond, input string what, input int abs_t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL tick %0d: %s", abs_t, what);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_end, abs_t, ts;
    ph.push_back('{ST_IDLE,    2, 0});
    ph.push_back('{ST_PRESYNC, 3, 0});
    ph.push_back('{ST_SYNC,    M + 1, 0});
    ph.push_back('{ST_DEMOD,   4, 40});
    ph.push_back('{ST_PRESYNC, 1, 0});
    ph.push_back('{ST_DEMOD,   3, 0});
    ph.push_back('{ST_IDLE,    1, 0});
    ph.push_back('{ST_DEMOD,   3, HALF});
    ph.push_back('{ST_IDLE,    2, 0});

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    abs_t = 0;
    foreach (ph[i]) begin
      t0 = abs_t;
      t_end = t0 + ph[i].periods * SYM;
      ts = ph[i].ts;
      // expected events of this phase
      case (ph[i].st)
        ST_PRESYNC:
          for (int w = t0; w < t_end; w += HALF) begin
            exp_dump[w] = 1;
            for (int k = 0; k < HALF; k++) exp_integ[w + k] = 1;
            if (w + HALF <= t_end) begin
              exp_tag[w + HALF] = ((w - t0) / HALF) % 2;
              exp_sst[w + HALF] = ST_PRESYNC;
            end
          end
        ST_SYNC:
          for (int m = 0; m < M; m++) begin
            int w;
            w = t0 + m * SYM + m * STEP;
            exp_dump[w] = 1;
            for (int k = 0; k < HALF; k++) exp_integ[w + k] = 1;
            exp_tag[w + HALF] = m;
            exp_sst[w + HALF] = ST_SYNC;
          end
        ST_DEMOD: begin
          for (int k = t0; k < t_end; k++) exp_integ[k] = 1;
          for (int w = t0 + ts % HALF; w < t_end; w += HALF) begin
            exp_dump[w] = 1;
            if (w + HALF <= t_end) begin
              exp_tag[w + HALF] = (((w - t0 - ts) / HALF) % 2 + 2) % 2;
              exp_sst[w + HALF] = ST_DEMOD;
            end
          end
        end
        default: ;
      endcase
      while (abs_t < t_end) begin
        state   = ph[i].st;
        t_synch = TW'(ts);
        #0.5;
        chk(int'(tick) == abs_t % SYM, "tick", abs_t);
        chk(period_end == (abs_t % SYM == SYM - 1), "period_end", abs_t);
        chk(dump == exp_dump.exists(abs_t), "dump", abs_t);
        chk(integ == exp_integ.exists(abs_t), "integ", abs_t);
        chk(sample == exp_tag.exists(abs_t), "sample", abs_t);
        if (sample && exp_tag.exists(abs_t)) begin
          chk(int'(sample_tag) == exp_tag[abs_t], "sample_tag", abs_t);
          chk(sample_state == exp_sst[abs_t], "sample_state", abs_t);
          if (sample_state == ST_SYNC)    n_sync_win++;
          if (sample_state == ST_DEMOD)   n_demod_samp++;
          if (sample_state == ST_PRESYNC) n_pre_samp++;
        end
        chk(timesweep == (state == ST_SYNC && exp_integ.exists(abs_t)), "timesweep", abs_t);
        if (state == ST_SYNC) begin
          int m_exp;
          m_exp = (abs_t - t0) / SYM;
          chk(int'(sweep_idx) == (m_exp > M ? M : m_exp), "sweep_idx", abs_t);
          if (m_exp < M)
            chk(int'(delay_step) == m_exp * STEP, "delay_step", abs_t);
        end
        if (state == ST_DEMOD) begin
          bit lc;
          lc = ((abs_t - t0 - ts + SYM) % SYM) < HALF;
          chk(locked_clk == lc, "locked_clk", abs_t);
          n_lck += lc;
        end else
          chk(locked_clk == 1'b0, "locked_clk off", abs_t);
        @(negedge clk);
        abs_t++;
      end
    end
    // every mechanism must have been exercised
    chk(n_sync_win == M, "all sweep windows sampled", abs_t);
    chk(n_pre_samp == 8, "pre-sync samples", abs_t);
    chk(n_demod_samp > 0 && n_lck > 0, "demod samples / locked clock", abs_t);
    $display("sweep windows %0d, pre-sync samples %0d, demod samples %0d",
             n_sync_win, n_pre_samp, n_demod_samp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
