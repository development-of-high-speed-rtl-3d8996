`timescale 1ps/1fs
// Testbench for one complete TDC channel (hit controller, hit registers,
// transfer and encoding, level-1 buffer, trigger state machine) on an ideal
// time base: a 1.28 GHz clock, 32 taps delayed by 24.414 ps each, the Gray
// coarse counter and its synchronised copy on a 40 MHz logic clock.
//
// Untriggered mode: pulses at random times (250 to 400 ns long, at least
// 300 ns apart, as one edge must be transferred before the next is taken;
// both edges selected) must give one word per edge whose timestamp equals
// the hit time in 24.414 ps bins, within one bin, including hits close to
// the clock edge where coarse and fine change together. The first hit
// fixes the constant offset. The time from a hit to its word at the output
// must be under 8 logic cycles. A disabled channel must give nothing.
// Triggered mode (latency 2 us, window 1 us): a trigger after a group of
// hits selects exactly the hits whose timestamps lie in the window that
// starts at the trigger's coarse time minus the latency.
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam real T = 781.25;
  localparam real BIN = T / 32.0;
  logic clk1280 = 0, clk = 0, rst_n = 1, hit_in = 0, enable = 1;
  logic [TAPS-1:0] taps;
  logic [COARSE_W-1:0] coarse_gray, now, trig_start = 0;
  logic trig_valid = 0;
  logic [EVT_W-1:0] trig_evt = 0;
  edge_sel_e edge_sel = EDGE_BOTH;
  trig_cfg_t cfg = '0;
  logic out_valid, out_ready = 1, out_last;
  trig_word_t out_word;
  logic ev_discard, ev_corrupt, ev_done, l1_overflow;
  int checks = 0, failures = 0, words = 0;
  realtime hit_t [$];
  logic    hit_tr [$];
  longint  offset;
  logic    have_off = 0;
  realtime trig_hits [$];

  always #(T / 2) clk1280 = !clk1280;
  always #(T * 16) clk = !clk;
  // ideal delay line: a chain of 24.414 ps elements
  logic line [TAPS];
  assign line[0] = clk1280;
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    if (k > 0) begin : g_el
      always @(line[k-1]) line[k] <= #(BIN) line[k-1];
    end
    assign taps[k] = line[k];
  end
  coarse_counter u_cnt (.clk(clk1280), .rst_n, .gray(coarse_gray));
  coarse_sync u_sync (.clk, .rst_n, .gray_in(coarse_gray), .now);

  tdc_channel dut (.clk, .rst_n, .hit_in, .taps, .coarse_gray, .enable, .edge_sel, .cfg, .now,
    .trig_valid, .trig_start, .trig_evt, .out_valid, .out_ready, .out_word, .out_last,
    .ev_discard, .ev_corrupt, .ev_done, .l1_overflow);

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time of the hit in bins since the start of the counter
  function automatic longint bin_of(realtime t);
    return longint'($floor(t / BIN));
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    words++;
    if (hit_t.size() == 0) begin failures++; $display("%0t unexpected word", $time); end
    else begin
      realtime t;
      logic tr;
      longint b, d;
      t = hit_t.pop_front();
      tr = hit_tr.pop_front();
      b = bin_of(t);
      if (!have_off) begin offset = longint'(out_word.ts) - b; have_off = 1; end
      d = (longint'(out_word.ts) - b - offset) % (longint'(1) << TS_W);
      checks++;
      if (d != 0 && d != 1 && d != -1 && d != (longint'(1) << TS_W) - 1) begin
        failures++;
        $display("hit at %0.1f ps: ts %0d, off by %0d bins", t, out_word.ts, d);
      end
      checks++;
      if (out_word.trailing !== tr) begin failures++; $display("edge flag"); end
      checks++;
      if (!cfg.triggered && $realtime - t > 8 * 32 * T) begin failures++; $display("latency %0.1f ns", ($realtime - t) / 1000.0); end
    end
  end

  task automatic hit_pulse(input realtime at_lead, input realtime width, input logic record);
    #(at_lead - $realtime);
    hit_in = 1;
    if (record) begin hit_t.push_back($realtime); hit_tr.push_back(0); end
    #(width);
    hit_in = 0;
    if (record) begin hit_t.push_back($realtime); hit_tr.push_back(1); end
  endtask

  initial begin
    #1 rst_n = 0;
    #(T * 100) rst_n = 1;
    #(T * 100);
    // random hits, some close to a clock edge
    for (int i = 0; i < 200; i++) begin
      realtime t0, w;
      t0 = $realtime + 300_000.0 + real'($urandom_range(0, 100_000)) + real'($urandom_range(0, 999)) / 1000.0;
      if (i % 4 == 0) t0 = T * $floor(t0 / T) + T / 2 + real'($urandom_range(0, 2)) - 1.0;
      if (i % 4 == 1) t0 = T * $floor(t0 / T) + real'($urandom_range(0, 2)) - 1.0;
      w = 250_000.0 + real'($urandom_range(0, 150_000));
      hit_pulse(t0, w, 1);
    end
    #(T * 32 * 20);
    checks++;
    if (hit_t.size() != 0 || words != 400) begin failures++; $display("words %0d left %0d", words, hit_t.size()); end
    // disabled channel
    enable = 0;
    hit_pulse($realtime + 1000.0, 3000.0, 0);
    #(T * 32 * 20);
    checks++;
    if (words != 400) begin failures++; $display("disabled channel produced a word"); end
    enable = 1;
    // triggered: latency 2 us = 2560 coarse counts, window 1 us = 1280
    begin
      trig_cfg_t c;
      c = cfg;
      c.triggered = 1;
      c.latency = 2560;
      c.window = 1280;
      cfg = c;
    end
    edge_sel = EDGE_LEADING;
    begin
      realtime ts0;
      int sel;
      ts0 = $realtime + 10_000.0;
      sel = 0;
      // hits every 150 ns over 2 us; the trigger comes 2.5 us after the
      // first, so its window starts about 500 ns after the first hit (less
      // the synchronisation delay of the coarse time)
      for (int i = 0; i < 13; i++) begin
        realtime th;
        th = ts0 + 150_000.0 * i;
        hit_pulse(th, 3000.0, 0);
        trig_hits.push_back(th);
      end
      #(ts0 + 500_000.0 + 2_000_000.0 - $realtime);
      @(negedge clk);
      trig_valid = 1;
      trig_start = now - 22'd2560;
      @(negedge clk);
      trig_valid = 0;
      foreach (trig_hits[i]) begin
        ts_t e, s0;
        e = ts_t'(bin_of(trig_hits[i]) + offset);
        s0 = {trig_start, 5'd0};
        if (e - s0 < ts_t'(1280 * 32)) begin
          hit_t.push_back(trig_hits[i]); hit_tr.push_back(0); sel++;
        end
      end
      #(T * 32 * 100);
      checks++;
      if (hit_t.size() != 0 || words != 400 + sel) begin
        failures++; $display("triggered: %0d words, %0d left", words - 400, hit_t.size());
      end
      $display("triggered: %0d hits selected of 13", sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
