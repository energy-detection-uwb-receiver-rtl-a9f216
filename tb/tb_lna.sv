// tb_lna: checks the amplifier model: output = GAIN * input when powered,
// 0 V when powered down, for random input voltages.
module tb_lna;
  localparam real GAIN = 10.0;
  logic en;
  real  rf_in, rf_out;
  int checks = 0, failures = 0;

  lna #(.GAIN(GAIN)) dut (.en(en), .rf_in(rf_in), .rf_out(rf_out));

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      en    = (i % 4) != 3;
      rf_in = (real'($urandom_range(0, 20000)) - 10000.0) * 1.0e-6;
      #1;
      checks++;
      if (absr(rf_out - (en ? rf_in * 10.0 : 0.0)) > 1.0e-12) begin
        failures++;
        $display("FAIL in=%g en=%0b out=%g", rf_in, en, rf_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
