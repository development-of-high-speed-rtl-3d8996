`timescale 1ps/1fs
// Testbench for trigger_gen: every rising edge of the asynchronous trigger
// input must produce one trig_valid pulse, 3 cycles after the edge is first
// sampled, with start = now - latency (now as seen at that moment, modulo
// 2^22) and event numbers counting up from 0.
module tb_trigger_gen;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 1, trigger_in = 0, trig_valid;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  coarse_t now = '0, latency, trig_start;
  logic [EVT_W-1:0] trig_evt;
  int checks = 0, failures = 0, pulses = 0;

  trigger_gen dut (.clk, .rst_n, .trigger_in, .now, .latency, .trig_valid, .trig_start, .trig_evt);

  always #5 clk = !clk;
  always @(posedge clk) now <= now + 1;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && trig_valid) pulses++;

  initial begin
    latency = 22'd1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      coarse_t now_at_edge;
      int cyc;
      repeat ($urandom_range(2, 10)) @(posedge clk);
      #2 trigger_in = 1;
      @(posedge clk); #1;     // first sampling edge
      now_at_edge = now;      // value of now after that edge
      cyc = 1;
      while (!trig_valid) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != 3) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (trig_start !== coarse_t'(now_at_edge + 1 - latency)) begin
        failures++; $display("start %0d exp %0d", trig_start, now_at_edge + 1 - latency);
      end
      checks++;
      if (trig_evt !== EVT_W'(i)) begin failures++; $display("evt %0d exp %0d", trig_evt, i); end
      repeat ($urandom_range(1, 4)) @(posedge clk);
      trigger_in = 0;
      latency = coarse_t'($urandom_range(0, 5000));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (pulses != 50) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
