`timescale 1ps/1fs
// Testbench for l1_buffer: random writes and pops of 0, 1 or 2 words against
// a queue model; checks the count, the words at two random offsets, that a
// write into a full buffer is dropped and sets lost, and that lost_clr
// clears it.
module tb_l1_buffer;
  import tdc_pkg::*;
  localparam int DEPTH = 8;
  localparam int CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 1, wr_en = 0, lost, lost_clr = 0;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  l1_word_t wr_data, d0, d1;
  logic [1:0] pop = 0;
  logic [CW-1:0] off0 = 0, off1 = 0, count;
  l1_word_t model[$];
  logic exp_lost = 0;
  int checks = 0, failures = 0, overflows = 0;

  l1_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .pop,
    .rd_off0(off0), .rd_off1(off1), .rd_data0(d0), .rd_data1(d1), .count, .lost, .lost_clr);

  always #5 clk = !clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != CW'(model.size())) begin failures++; $display("count %0d exp %0d", count, model.size()); end
      off0 = CW'($urandom_range(0, DEPTH - 1));
      off1 = CW'($urandom_range(0, DEPTH - 1));
      #1;
      if (off0 < model.size()) begin
        checks++; if (d0 !== model[off0]) begin failures++; $display("d0 mismatch"); end
      end
      if (off1 < model.size()) begin
        checks++; if (d1 !== model[off1]) begin failures++; $display("d1 mismatch"); end
      end
      checks++;
      if (lost !== exp_lost) begin failures++; $display("lost %b exp %b", lost, exp_lost); end
      // next operation
      wr_en    = ($urandom_range(0, 99) < ((i / 400) % 2 ? 70 : 40));
      wr_data  = l1_word_t'($urandom);
      pop      = 2'($urandom_range(0, 2));
      if ($urandom_range(0, 3) == 0) pop = 0;
      lost_clr = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      #1;
      // model update: pops limited by the count before the write
      begin
        int cnt0, npop;
        logic do_wr;
        cnt0  = model.size();
        do_wr = wr_en && cnt0 != DEPTH;
        npop  = (pop > cnt0) ? cnt0 : pop;
        repeat (npop) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
        if (wr_en && !do_wr) begin exp_lost = 1; overflows++; end
        else if (lost_clr) exp_lost = 0;
      end
      wr_en = 0; pop = 0; lost_clr = 0;
    end
    checks++;
    if (overflows == 0) begin failures++; $display("no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
