`timescale 1ps/1fs
// Testbench for channel_merger with 4 channels: each channel offers a queue
// of words (some as leading/trailing pairs) at random times while the
// output is stalled at random. Checks: every word arrives exactly once,
// tagged with its channel, in order per channel; the two words of a pair
// are never separated; and when several channels wait, the token moves on
// to the next channel with data after each transfer (round robin).
module tb_channel_merger;
  import tdc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic [N-1:0] in_valid, in_ready, in_last;
  trig_word_t in_word [N];
  logic out_valid, out_ready, out_last;
  merge_word_t out_word;
  trig_word_t q [N][$];
  logic       ql [N][$];
  int checks = 0, failures = 0, received = 0, sent = 0, rr_checks = 0;
  int last_ch = -1;
  logic in_pair = 0;
  int pair_ch;

  channel_merger #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_word, .in_last,
    .out_valid, .out_ready, .out_word, .out_last);

  always #5 clk = !clk;

  always_comb begin
    for (int c = 0; c < N; c++) begin
      in_valid[c] = q[c].size() > 0;
      in_word[c]  = (q[c].size() > 0) ? q[c][0] : '0;
      in_last[c]  = (q[c].size() > 0) ? ql[c][0] : 1'b1;
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected per-channel sequence numbers are carried in the timestamp
  int next_seq [N];
  initial for (int c = 0; c < N; c++) next_seq[c] = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int c;
      c = out_word.ch;
      checks++;
      if (out_word.w.ts !== ts_t'(c * 100000 + next_seq[c])) begin
        failures++; $display("ch %0d got %0d exp %0d", c, out_word.w.ts, c * 100000 + next_seq[c]);
      end
      next_seq[c]++;
      if (in_pair) begin
        checks++;
        if (c != pair_ch) begin failures++; $display("pair split"); end
      end
      in_pair = !out_last;
      pair_ch = c;
      // round robin: if the previous channel is done and another one waits,
      // the grant must be the next waiting channel after the previous one
      if (!in_pair && last_ch >= 0 && !was_locked) begin
        int exp_c;
        exp_c = -1;
        for (int i = 1; i <= N; i++)
          if (exp_c < 0 && valid_before[(last_ch + i) % N]) exp_c = (last_ch + i) % N;
        rr_checks++;
        checks++;
        if (exp_c != c) begin failures++; $display("round robin: got %0d exp %0d", c, exp_c); end
      end
      was_locked = !out_last;
      if (out_last) last_ch = c;
      void'(q[c].pop_front());
      void'(ql[c].pop_front());
      received++;
    end
  end

  logic [N-1:0] valid_before;
  logic was_locked = 0;
  always @(negedge clk) valid_before = in_valid;

  initial begin
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        if ($urandom_range(0, 9) < 2) begin
          trig_word_t w;
          int pair;
          pair = ($urandom_range(0, 3) == 0);
          w = '0;
          w.ts = ts_t'(c * 100000 + sent_c[c]);
          q[c].push_back(w); ql[c].push_back(!pair); sent_c[c]++; sent++;
          if (pair) begin
            w.ts = ts_t'(c * 100000 + sent_c[c]); w.trailing = 1;
            q[c].push_back(w); ql[c].push_back(1'b1); sent_c[c]++; sent++;
          end
        end
      end
      valid_before = in_valid;
      #0 valid_before = in_valid;
      out_ready = ($urandom_range(0, 9) < 7);
    end
    out_ready = 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (received != sent) begin failures++; $display("received %0d sent %0d", received, sent); end
    checks++;
    if (rr_checks < 100) begin failures++; $display("few round-robin checks %0d", rr_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int sent_c [N] = '{default: 0};
endmodule
