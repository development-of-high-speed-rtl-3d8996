`timescale 1ps/1fs
// Testbench for the DLL start-up state machine. Checks, cycle by cycle:
// precharge for one cycle after reset; no pumping during the 4 settle
// cycles; with late still high the machine pumps down (more delay) until
// late has been low for 8 consecutive cycles, a single late cycle restarting
// the count; then tracking, where the pump follows the phase detector. The
// configuration override must take the pump in every state. A second run
// starts with late low and must go straight to tracking.
module tb_dll_startup_fsm;
  logic clk = 0, rst_n = 1, late = 1, force_en = 0, force_dn = 0;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic precharge, cp_up, cp_dn, tracking;
  int checks = 0, failures = 0;
  dll_startup_fsm dut (.*);
  always #5 clk = !clk;
  task automatic expect_o(input logic pre, up, dn, trk, input string s);
    checks++;
    if ({precharge, cp_up, cp_dn, tracking} !== {pre, up, dn, trk}) begin
      failures++;
      $display("%s: pre %b up %b dn %b trk %b", s, precharge, cp_up, cp_dn, tracking);
    end
  endtask
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #12;
    expect_o(1, 0, 0, 0, "reset");
    @(negedge clk) rst_n = 1;
    expect_o(1, 0, 0, 0, "precharge");
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin expect_o(0, 0, 0, 0, "settle"); @(negedge clk); end
    expect_o(0, 0, 0, 0, "check");
    @(negedge clk);
    repeat (5) begin expect_o(0, 0, 1, 0, "slow"); @(negedge clk); end
    late = 0;
    repeat (5) begin expect_o(0, 0, 1, 0, "slow, counting"); @(negedge clk); end
    late = 1;
    expect_o(0, 0, 1, 0, "slow, restart");
    @(negedge clk);
    late = 0;
    repeat (8) begin expect_o(0, 0, 1, 0, "slow, consistent"); @(negedge clk); end
    expect_o(0, 0, 1, 1, "track, early");
    // tracking follows the detector
    for (int i = 0; i < 50; i++) begin
      late = 1'($urandom);
      #1 expect_o(0, late, !late, 1, "track");
      @(negedge clk);
    end
    // override
    force_en = 1;
    force_dn = 1; #1 expect_o(0, 0, 1, 1, "force down");
    force_dn = 0; #1 expect_o(0, 0, 0, 1, "force hold");
    force_en = 0;
    // second start with the delay already short enough
    rst_n = 0; late = 0;
    @(negedge clk) rst_n = 1;
    repeat (6) @(negedge clk);
    expect_o(0, 1'b0, 1'b1, 1, "direct to track");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
