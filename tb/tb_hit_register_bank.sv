`timescale 1ps/1fs
// Testbench for hit_register_bank: the bank must take d on the rising edge of
// its hit clock and hold it while d changes; random patterns.
module tb_hit_register_bank;
  localparam int W = 32;
  logic hit_clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic [W-1:0] d, q, exp_q;
  int checks = 0, failures = 0;

  hit_register_bank #(.W(W)) dut (.hit_clk, .rst_n, .d, .q);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #10;
    checks++; if (q !== '0) begin failures++; $display("reset"); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = $urandom;
      #7;
      exp_q = d;
      hit_clk = 1;
      #3;
      checks++; if (q !== exp_q) begin failures++; $display("capture %h exp %h", q, exp_q); end
      d = ~d;
      #5;
      hit_clk = 0;
      #5;
      checks++; if (q !== exp_q) begin failures++; $display("hold %h exp %h", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
