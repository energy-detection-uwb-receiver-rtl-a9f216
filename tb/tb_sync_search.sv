// tb_sync_search: checks the maximum-energy search. Random sweeps of M
// energies (some with ties, some with the maximum at the ends) are fed with
// their index; the testbench finds the first largest energy itself and
// checks best_m, best_e, t_synch = m*(Ts/2)/(M-1) ticks, the one-clock
// `done` pulse after the last sample, and that the result holds until clr.
module tb_sync_search;
  import uwb_pkg::*;
  localparam int BITS = 8, SYM = SYM_TICKS_D, M = M_SWEEPS_D;
  localparam int STEP = (SYM / 2) / (M - 1);
  localparam int TW = $clog2(SYM + 1), MW = $clog2(M + 1);
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, valid = 1'b0;
  logic [BITS-1:0] code = '0;
  logic [MW-1:0] m_idx = '0;
  logic done, found;
  logic [MW-1:0] best_m;
  logic [BITS-1:0] best_e;
  logic [TW-1:0] t_synch;
  int checks = 0, failures = 0;

  sync_search dut (.*);

  always #1 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (best_m=%0d t_synch=%0d)", what, best_m, t_synch); end
  endtask

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e[M];
    int bm, be, n_done;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      chk(!found, "cleared");
      for (int m = 0; m < M; m++) e[m] = $urandom_range(0, (r % 3 == 0) ? 3 : 255);
      if (r == 1) e[0] = 255;
      if (r == 2) e[M-1] = 255;
      bm = 0; be = e[0];
      for (int m = 1; m < M; m++) if (e[m] > be) begin be = e[m]; bm = m; end
      n_done = 0;
      for (int m = 0; m < M; m++) begin
        code = BITS'(e[m]); m_idx = MW'(m); valid = 1'b1;
        @(negedge clk);
        valid = 1'b0;
        n_done += done;
        if (m < M - 1) begin
          repeat ($urandom_range(0, 3)) begin @(negedge clk); n_done += done; end
          chk(!found, "not found before the last sweep");
        end
      end
      chk(done && n_done == 1, "single done pulse right after last sample");
      chk(found, "found");
      chk(int'(best_m) == bm, "best_m");
      chk(int'(best_e) == be, "best_e");
      chk(int'(t_synch) == bm * STEP, "t_synch");
      // later samples must not disturb the held result
      code = 8'hff; m_idx = '0; valid = 1'b1; @(negedge clk); valid = 1'b0;
      @(negedge clk);
      chk(!done && int'(t_synch) == bm * STEP, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
