`timescale 1ps/1fs
// Testbench for coarse_sync: a Gray counter running on a fast clock is read
// through the synchroniser on an unrelated slower clock; every output value
// must be a binary count no later than the true count and no more than
// 4 slow cycles behind it, and must never go backwards.
module tb_coarse_sync;
  import tdc_pkg::*;
  logic fclk = 0, clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  coarse_t cnt = '0, gray_in, now, prev;
  int checks = 0, failures = 0;

  coarse_sync dut (.clk, .rst_n, .gray_in, .now);

  always #390.625 fclk = !fclk;
  always #3217 clk = !clk;
  always @(posedge fclk) if (rst_n) cnt <= cnt + 1;
  assign gray_in = bin2gray(cnt);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev = '0;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (now > cnt || cnt - now > coarse_t'(4 * 9)) begin
        failures++; $display("now %0d true %0d", now, cnt);
      end
      checks++;
      if (now < prev) begin failures++; $display("backwards %0d < %0d", now, prev); end
      prev = now;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
