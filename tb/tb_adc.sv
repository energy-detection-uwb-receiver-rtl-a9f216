// tb_adc: checks the converter model: code = floor(vin/VFS*2^BITS) clipped
// to the code range, valid exactly one clock after a sample strobe, code
// held between strobes, nothing converted while powered down.
module tb_adc;
  localparam int  BITS = 8;
  localparam real VFS  = 2.0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, sample = 1'b0;
  real  vin = 0.0;
  logic [BITS-1:0] code;
  logic valid;
  int checks = 0, failures = 0;

  adc #(.BITS(BITS), .VFS(VFS)) dut (.*);

  always #1 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (vin=%g code=%0d valid=%0b)", what, vin, code, valid);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expc, lvl;
    logic [BITS-1:0] last;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      // pick a level, place vin in the middle of its step, sometimes out of range
      lvl = $urandom_range(0, 300) - 20;
      vin = (real'(lvl) + 0.5) * VFS / 256.0;
      expc = lvl < 0 ? 0 : (lvl > 255 ? 255 : lvl);
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      chk(valid == 1'b1, "valid one clock after strobe");
      chk(int'(code) == expc, "code");
      last = code;
      vin = 0.3;
      @(negedge clk);
      chk(valid == 1'b0, "valid is one cycle");
      chk(code == last, "code held");
    end
    en = 1'b0; sample = 1'b1; vin = 1.0;
    @(negedge clk);
    chk(valid == 1'b0, "no conversion when off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
