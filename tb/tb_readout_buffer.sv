`timescale 1ps/1fs
// Testbench for readout_buffer (depth 64). A random stream of single hits,
// leading/trailing pairs and loss markers is written while the reader
// stalls at random. A reference queue predicts each output word: single
// words become RO_HIT, loss markers RO_LOSS, and a pair becomes one RO_PAIR
// word holding the leading timestamp and the width trailing - leading,
// saturated at 16 bits. Also checks that in_ready falls exactly when 64
// words are stored and that a word written into an empty buffer is readable
// on the next cycle.
module tb_readout_buffer;
  import tdc_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 1, out_valid, out_ready = 0;
  merge_word_t in_word = '0;
  ro_word_t out_word;
  ro_word_t exp_q [$];
  int checks = 0, failures = 0, pairs = 0, sats = 0, losses = 0, fulls = 0;
  int stored = 0;

  readout_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        ro_word_t e;
        e = exp_q.pop_front();
        if (out_word !== e) begin
          failures++;
          $display("%0t mismatch kind %0d/%0d ts %0d/%0d w %0d/%0d", $time, out_word.kind, e.kind,
                   out_word.ts, e.ts, out_word.width, e.width);
        end
      end
    end
  end

  // drive at the falling edge, hold until accepted at a rising edge
  task automatic put(input merge_word_t w, input logic last);
    logic ok;
    @(negedge clk);
    in_valid = 1; in_word = w; in_last = last;
    ok = in_ready;
    @(posedge clk);
    while (!ok) begin
      @(negedge clk);
      ok = in_ready;
      @(posedge clk);
    end
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: one word into an empty buffer is visible after one cycle
    begin
      merge_word_t w;
      ro_word_t e;
      w = '0; w.ch = 3; w.w.ts = 1234;
      e = '0; e.kind = RO_HIT; e.ch = 3; e.ts = 1234;
      exp_q.push_back(e);
      put(w, 1);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("latency: not valid after one cycle"); end
      @(negedge clk) out_ready = 1;
      @(negedge clk) out_ready = 0;
    end
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      merge_word_t w;
      ro_word_t e;
      w = '0; w.ch = CH_W'(i); w.w.ts = ts_t'(i);
      e = '0; e.kind = RO_HIT; e.ch = CH_W'(i); e.ts = ts_t'(i);
      exp_q.push_back(e);
      put(w, 1);
    end
    #1;
    checks++;
    if (in_ready) begin failures++; $display("in_ready high when full cnt=%0d t=%0t", dut.cnt_q, $time); end
    else fulls++;
    fork
      begin
        repeat (20000) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 9) < 6);
        end
        out_ready = 1;
      end
      begin
        for (int i = 0; i < 5000; i++) begin
          int k;
          merge_word_t w;
          ro_word_t e;
          k = $urandom_range(0, 9);
          w = '0;
          w.ch = CH_W'($urandom);
          w.w.evt = EVT_W'($urandom);
          w.w.ts = ts_t'($urandom);
          e = '0; e.ch = w.ch; e.evt = w.w.evt; e.ts = w.w.ts;
          if (k < 4) begin
            w.w.trailing = k[0];
            e.kind = RO_HIT; e.trailing = k[0];
            exp_q.push_back(e);
            put(w, 1);
          end else if (k < 9) begin
            merge_word_t t;
            ts_t d;
            d = (k == 8) ? ts_t'($urandom_range(65536, 200000)) : ts_t'($urandom_range(0, 70000));
            t = w; t.w.trailing = 1; t.w.ts = w.w.ts + d;
            e.kind = RO_PAIR; e.trailing = 0;
            e.evt = t.w.evt;
            e.width = (d > 65535) ? 16'hffff : d[15:0];
            if (d > 65535) sats++;
            exp_q.push_back(e);
            pairs++;
            put(w, 0);
            if ($urandom_range(0, 1)) @(posedge clk);
            put(t, 1);
          end else begin
            w.w.loss = 1;
            e.kind = RO_LOSS;
            exp_q.push_back(e);
            losses++;
            put(w, 1);
          end
        end
      end
    join
    repeat (200) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words not read", exp_q.size()); end
    checks++;
    if (pairs < 100 || sats < 10 || losses < 50 || fulls < 1) begin
      failures++; $display("coverage pairs %0d sats %0d losses %0d", pairs, sats, losses);
    end
    $display("pairs=%0d saturated=%0d losses=%0d", pairs, sats, losses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
