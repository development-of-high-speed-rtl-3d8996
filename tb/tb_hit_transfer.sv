`timescale 1ps/1fs
// Testbench for hit_transfer: a model of the hit controller raises ctrl with
// a stored DLL pattern and Gray count; the block must write {coarse, fine}
// with correct parity to the level-1 port within 4 cycles of ctrl rising,
// raise ack, and take the next hit only after ctrl has fallen. The expected
// fine value is the bin number used to build the pattern: taps k..k-15
// (mod 32) are high when the clock edge has passed tap k.
module tb_hit_transfer;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 1, ctrl = 0, trailing = 0, ack, wr_en;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic [COARSE_W-1:0] raw_coarse;
  logic [TAPS-1:0] raw_taps;
  l1_word_t wr_data;
  int checks = 0, failures = 0, writes = 0;

  hit_transfer dut (.clk, .rst_n, .ctrl, .trailing, .raw_coarse, .raw_taps, .ack, .wr_en, .wr_data);

  always #5 clk = !clk;

  // controller model: ack clears ctrl
  always @(posedge ack) ctrl = 0;
  always @(posedge clk) if (wr_en && rst_n) writes++;

  function automatic logic [TAPS-1:0] pattern(int n);
    logic [TAPS-1:0] p = '0;
    for (int j = 0; j < 16; j++) p[(n - j + TAPS) % TAPS] = 1'b1;
    return p;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      int n, cyc;
      coarse_t c;
      n = $urandom_range(0, 31);
      c = coarse_t'($urandom);
      @(negedge clk);
      raw_taps   = pattern(n);
      raw_coarse = bin2gray(c);
      trailing   = $urandom_range(0, 1);
      #2 ctrl = 1;
      cyc = 0;
      while (!wr_en) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc > 4) begin failures++; $display("latency %0d cycles", cyc); end
      checks++;
      if (wr_data.ts !== {c, FINE_W'(n)} || wr_data.trailing !== trailing ||
          wr_data.par !== ^{trailing, c, FINE_W'(n)}) begin
        failures++; $display("word %h exp ts %h", wr_data, {c, FINE_W'(n)});
      end
      // released: ack must come and drop again
      while (ack) @(posedge clk);
      checks++;
      if (ctrl) begin failures++; $display("ctrl not released"); end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (writes != 100) begin failures++; $display("writes %0d", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
