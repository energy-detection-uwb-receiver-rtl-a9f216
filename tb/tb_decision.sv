// tb_decision: checks the 2-PPM decision: for random (z0, z1) pairs, and for
// equal ones, bit = 0 exactly when z0 > z1, delivered one clock after z1 with
// a one-clock bit_valid; a z1 with no z0 before it gives no bit.
module tb_decision;
  localparam int BITS = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid = 1'b0, half = 1'b0;
  logic [BITS-1:0] code = '0;
  logic bit_valid, bit_out;
  logic [BITS-1:0] z0, z1;
  int checks = 0, failures = 0;

  decision #(.BITS(BITS)) dut (.*);

  always #1 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input bit h, input int c);
    half = h; code = BITS'(c); valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
  endtask

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    put(1, 10);
    chk(!bit_valid, "lone z1 ignored");
    for (int i = 0; i < 300; i++) begin
      a = $urandom_range(0, 255);
      b = (i % 7 == 0) ? a : $urandom_range(0, 255);
      put(0, a);
      chk(!bit_valid, "no bit after z0");
      repeat ($urandom_range(0, 4)) @(negedge clk);
      put(1, b);
      chk(bit_valid, "bit one clock after z1");
      chk(bit_out == !(a > b), "decision rule");
      chk(int'(z0) == a && int'(z1) == b, "held energies");
      @(negedge clk);
      chk(!bit_valid, "bit_valid one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
