`timescale 1ps/1fs
// Testbench for coarse_counter: after n clock edges the output must be the
// Gray code of n (computed here as n ^ (n >> 1)) and successive values must
// differ in exactly one bit. A small width is used to also cover the wrap.
module tb_coarse_counter;
  localparam int W = 6;
  logic clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic [W-1:0] gray, prev;
  int checks = 0, failures = 0;

  coarse_counter #(.W(W)) dut (.clk, .rst_n, .gray);

  always #390 clk = !clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (gray !== '0) begin failures++; $display("reset value %h", gray); end
    rst_n = 1;
    prev = gray;
    for (int n = 1; n <= 3 * (1 << W); n++) begin
      @(negedge clk);
      checks++;
      if (gray !== W'((n % (1 << W)) ^ ((n % (1 << W)) >> 1))) begin
        failures++; $display("n=%0d gray=%b exp=%b", n, gray, W'((n % (1 << W)) ^ ((n % (1 << W)) >> 1)));
      end
      checks++;
      if ($countones(gray ^ prev) != 1) begin failures++; $display("not one bit change at %0d", n); end
      prev = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
