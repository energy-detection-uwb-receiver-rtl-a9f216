// tb_sys_ctrl: checks the controller's phase sequence. Period markers come
// every 20 clocks; events (detect, sync done, resync, rx_en low) are raised in
// the middle of a period and the phase must change exactly at the next
// marker, never earlier; lock must follow demodulation.
module tb_sys_ctrl;
  import uwb_pkg::*;
  localparam int P = 20;
  logic clk = 1'b0, rst_n = 1'b0, rx_en = 1'b0, resync = 1'b0;
  logic period_end, presync_detect = 1'b0, sync_done = 1'b0;
  rx_state_e state;
  logic lock;
  int cyc = 0;
  int checks = 0, failures = 0;

  sys_ctrl dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign period_end = rst_n && (cyc % P == P - 1);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state=%s cyc=%0d)", what, state.name(), cyc); end
  endtask

  // wait for the clock after the next period marker
  task automatic to_boundary();
    while (!period_end) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic pulse_mid(ref logic s);
    repeat (5) @(negedge clk);
    s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (45) @(negedge clk);
    chk(state == ST_IDLE, "idle without rx_en");
    rx_en = 1'b1;
    @(negedge clk);
    chk(state == ST_IDLE, "waits for boundary");
    to_boundary();
    chk(state == ST_PRESYNC, "pre-sync");
    repeat (2) to_boundary();
    chk(state == ST_PRESYNC, "stays in pre-sync without detect");
    pulse_mid(presync_detect);
    chk(state == ST_PRESYNC, "no change mid-period");
    to_boundary();
    chk(state == ST_SYNC && !lock, "sync");
    to_boundary();
    chk(state == ST_SYNC, "sync waits for done");
    pulse_mid(sync_done);
    chk(state == ST_SYNC, "no change mid-period");
    to_boundary();
    chk(state == ST_DEMOD && lock, "demod and lock");
    repeat (3) to_boundary();
    chk(state == ST_DEMOD, "stays demodulating");
    pulse_mid(resync);
    to_boundary();
    chk(state == ST_PRESYNC && !lock, "resync");
    pulse_mid(presync_detect);
    to_boundary();
    chk(state == ST_SYNC, "sync again");
    repeat (5) @(negedge clk);
    rx_en = 1'b0;
    to_boundary();
    chk(state == ST_IDLE && !lock, "rx_en low gives idle");
    // an event raised on the marker clock itself is taken at that marker
    rx_en = 1'b1; to_boundary();
    while (!period_end) @(negedge clk);
    presync_detect = 1'b1; @(negedge clk); presync_detect = 1'b0;
    chk(state == ST_SYNC, "event on marker clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
