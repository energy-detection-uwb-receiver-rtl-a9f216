// tb_squarer: checks the square-law model: output = K * v^2 when powered
// (non-negative whatever the sign of v), 0 when powered down.
module tb_squarer;
  logic en;
  real  v_in, e_out;
  int checks = 0, failures = 0;

  squarer #(.K(2.0)) dut (.en(en), .v_in(v_in), .e_out(e_out));

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expv;
    for (int i = 0; i < 200; i++) begin
      en   = (i % 5) != 4;
      v_in = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-3;
      #1;
      expv = en ? 2.0 * v_in * v_in : 0.0;
      checks++;
      if (absr(e_out - expv) > 1.0e-9 || e_out < 0.0) begin
        failures++;
        $display("FAIL v=%g en=%0b out=%g", v_in, en, e_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
