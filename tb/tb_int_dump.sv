// tb_int_dump: checks the integrate-and-dump model. Random windows of random
// length are integrated (dump on the first tick, integ on all), held for a
// random number of ticks, and the held value is compared with the sum of the
// inputs times DT computed in the testbench; power-down must clear it.
module tb_int_dump;
  localparam real DT = 0.5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, dump = 1'b0, integ = 1'b0;
  real  e_in = 0.0, out;
  int checks = 0, failures = 0;

  int_dump #(.DT(DT)) dut (.*);

  always #1 clk = ~clk;

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  task automatic chk(input real got, input real expv, input string what);
    checks++;
    if (absr(got - expv) > 1.0e-9) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, expv);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum;
    int  len, hold;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 40; w++) begin
      len  = $urandom_range(1, 30);
      hold = $urandom_range(0, 5);
      sum  = 0.0;
      for (int k = 0; k < len; k++) begin
        dump  = (k == 0);
        integ = 1'b1;
        e_in  = real'($urandom_range(0, 1000)) * 1.0e-3;
        sum  += e_in * DT;
        @(negedge clk);
      end
      dump = 1'b0; integ = 1'b0; e_in = 5.0;   // input ignored while holding
      chk(out, sum, "end of window");
      repeat (hold) @(negedge clk);
      chk(out, sum, "held");
    end
    // dump without integ clears
    dump = 1'b1; @(negedge clk); dump = 1'b0;
    chk(out, 0.0, "dump only");
    // power-down clears
    integ = 1'b1; e_in = 1.0; repeat (3) @(negedge clk);
    en = 1'b0; @(negedge clk);
    chk(out, 0.0, "powered down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
