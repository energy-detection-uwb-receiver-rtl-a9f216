// tb_presync: checks the pre-synchronizer with directed window sequences
// (noise only, 2-PPM preamble pattern, interrupted hits) and with random
// sequences against a reference count kept in the testbench: detect must rise
// one clock after the HITS-th hit, a whole symbol (two windows) below
// threshold must clear the count, and dropping `en` must clear everything.
module tb_presync;
  localparam int BITS = 8, HITS = 3;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid = 1'b0;
  logic [BITS-1:0] code = '0, thr = 8'd60;
  logic detect;
  int checks = 0, failures = 0;

  presync #(.BITS(BITS), .HITS(HITS)) dut (.*);

  always #1 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // one window energy, then a few idle clocks
  task automatic win(input int c);
    code = BITS'(c); valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_hits, ref_quiet, c;
    bit ref_det;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    // noise only: never detected
    for (int i = 0; i < 50; i++) win($urandom_range(0, 60));
    chk(!detect, "noise only");
    // 2-PPM preamble: hit, miss, hit, miss, hit -> detect after third hit
    win(200); win(10); win(180); win(5);
    chk(!detect, "two hits only");
    code = 8'd150; valid = 1'b1; @(posedge clk); #0.1;
    chk(detect, "detect one clock after third hit");
    @(negedge clk); valid = 1'b0;
    en = 1'b0; @(negedge clk); en = 1'b1; @(negedge clk);
    chk(!detect, "cleared by en");
    // hit, hit, miss, miss (count cleared), hit, hit -> no detect, then hit -> detect
    win(100); win(100); win(1); win(1); win(100); win(100);
    chk(!detect, "count cleared by a quiet symbol");
    win(100);
    chk(detect, "detect after three hits since clear");
    // threshold is strict: equal is not a hit
    en = 1'b0; @(negedge clk); en = 1'b1;
    win(60); win(60); win(60); win(60);
    chk(!detect, "code equal to threshold is no hit");
    // random sequences against a reference
    for (int r = 0; r < 40; r++) begin
      en = 1'b0; @(negedge clk); en = 1'b1;
      ref_hits = 0; ref_quiet = 0; ref_det = 0;
      for (int i = 0; i < 12; i++) begin
        c = $urandom_range(0, 120);
        win(c);
        if (!ref_det) begin
          if (c > 60) begin ref_hits++; ref_quiet = 0; if (ref_hits >= HITS) ref_det = 1; end
          else begin if (ref_quiet) ref_hits = 0; ref_quiet = 1; end
        end
        chk(detect == ref_det, "random sequence");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
