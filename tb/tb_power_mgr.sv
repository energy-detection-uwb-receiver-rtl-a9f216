// tb_power_mgr: checks the power manager's enable table for every phase,
// with and without stand-by, and its one-clock registered timing.
module tb_power_mgr;
  import uwb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, standby = 1'b0;
  rx_state_e state = ST_IDLE;
  pwr_en_t pwr_en;
  int checks = 0, failures = 0;

  power_mgr dut (.*);

  always #1 clk = ~clk;

  // expected enables, written out bit by bit: fe integ adc presync sync demod ranging decoder
  function automatic logic [7:0] expected(input rx_state_e s, input logic sb);
    if (sb) return 8'b0000_0000;
    case (s)
      ST_PRESYNC: return 8'b1111_0000;
      ST_SYNC:    return 8'b1110_1000;
      ST_DEMOD:   return 8'b1110_0111;
      default:    return 8'b0000_0000;
    endcase
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_state_e s;
    logic sb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      s  = rx_state_e'(i % 4);
      sb = (i / 4) % 3 == 2;
      state = s; standby = sb;
      #0.5;
      checks++;
      if (pwr_en != expected(rx_state_e'((i + 3) % 4), (((i - 1) / 4) % 3 == 2) && i > 0) && i > 0) begin
        failures++;
        $display("FAIL enables changed before the clock, step %0d", i);
      end
      @(negedge clk);
      checks++;
      if (pwr_en != expected(s, sb)) begin
        failures++;
        $display("FAIL state %s standby %0b: %b", s.name(), sb, pwr_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
