`timescale 1ps/1fs
// Testbench for the prototype readout shift register at its full length of
// 1408 bits (44 channels x 32 bits). A random word is loaded in parallel and
// shifted out bit 0 first while a second random word is shifted in at the
// serial input; after 1408 shifts the second word must follow at the output.
module tb_readout_shift_register;
  localparam int W = 44 * 32;
  logic clk = 0, rst_n = 1, load = 0, sin = 0, sout;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic [W-1:0] pin, a, b;
  int checks = 0, failures = 0;
  readout_shift_register dut (.*);
  always #5 clk = !clk;
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < W; i++) begin a[i] = 1'($urandom); b[i] = 1'($urandom); end
    pin = a;
    #20 rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sout !== (r == 0 ? a[i] : b[i])) begin
          failures++;
          if (failures < 10) $display("round %0d bit %0d: %b", r, i, sout);
        end
        sin = b[i];
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
