`timescale 1ps/1fs
// Testbench for clock_divider with the default ratio of 32 (1.28 GHz down to
// the 40 MHz reference). Counts input edges between output rising edges and
// the number of input edges with the output high: each period must be
// exactly 32 input cycles with 16 high.
module tb_clock_divider;
  logic clk_in = 0, rst_n = 1, clk_out;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  int checks = 0, failures = 0, n = 0, hi = 0, periods = 0;
  clock_divider dut (.*);
  always #390.625 clk_in = !clk_in;
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic prev = 0;
  always @(posedge clk_in) if (rst_n) begin
    if (clk_out && !prev) begin
      if (periods > 1) begin
        checks++;
        if (n != 32 || hi != 16) begin failures++; $display("period %0d high %0d", n, hi); end
      end
      periods++;
      n = 0; hi = 0;
    end
    n++;
    if (clk_out) hi++;
    prev = clk_out;
  end
  initial begin
    #2000 rst_n = 1;
    repeat (32 * 200) @(posedge clk_in);
    checks++;
    if (periods < 198) begin failures++; $display("only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
