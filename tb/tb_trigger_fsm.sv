`timescale 1ps/1fs
// Testbench for trigger_fsm, connected to a real l1_buffer (depth 32).
//
// A reference model keeps every hit written to the buffer and every trigger
// the state machine accepted. When the machine reports an event as done
// (ev_done), the words it sent for that event are compared with the model:
// all hits with start <= ts < start + window, in time order, with the event
// number, absolute or relative to the window start, and, in pairing mode,
// every selected leading edge followed by its trailing edge. The coarse
// time starts just below 2^22 so that it wraps during the run.
//
// Phases (reset in between):
//   1 triggered, absolute time, single and overlapping triggers
//   2 triggered, relative time, pairing of leading and trailing edges
//   3 untriggered: every word sent in order; words with a parity error are
//     skipped and counted; a burst of 16 words must leave within 36 cycles
//     (one word per two cycles, well above 3 MHz per channel at 40 MHz)
//   4 triggered with no trigger: a word out of time order is removed with
//     its successor; old words are discarded
//   5 buffer overflow and trigger-queue overflow: a loss word must be sent
//     and every accepted trigger must still complete
module tb_trigger_fsm;
  import tdc_pkg::*;
  localparam int L1D = 32;
  localparam int CW = $clog2(L1D + 1);

  logic clk = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  trig_cfg_t cfg;
  logic [COARSE_W-1:0] now, trig_start;
  logic trig_valid = 0;
  logic [EVT_W-1:0] trig_evt = 0;
  logic wr_en = 0;
  l1_word_t wr_data;
  logic [1:0] pop;
  logic [CW-1:0] off0, off1, count;
  l1_word_t d0, d1;
  logic lost, lost_clr;
  logic out_valid, out_ready = 1, out_last;
  trig_word_t out_word;
  logic ev_discard, ev_corrupt, ev_done;

  l1_buffer #(.DEPTH(L1D)) u_l1 (.clk, .rst_n, .wr_en, .wr_data, .pop,
    .rd_off0(off0), .rd_off1(off1), .rd_data0(d0), .rd_data1(d1),
    .count, .lost, .lost_clr);

  trigger_fsm #(.L1_DEPTH(L1D)) dut (.clk, .rst_n, .cfg, .now, .trig_valid, .trig_start,
    .trig_evt, .l1_count(count), .l1_data0(d0), .l1_data1(d1), .l1_off0(off0),
    .l1_off1(off1), .l1_pop(pop), .l1_lost(lost), .l1_lost_clr(lost_clr),
    .out_valid, .out_ready, .out_word, .out_last, .ev_discard, .ev_corrupt, .ev_done);

  always #5 clk = !clk;

  typedef struct { ts_t ts; logic trailing; logic bad; } hit_t;
  typedef struct { logic [COARSE_W-1:0] start; logic [EVT_W-1:0] evt; } trig_t;
  hit_t hits [$];
  trig_t tq [$];
  trig_word_t got [$];
  trig_word_t unt_exp [$];

  int checks = 0, failures = 0;
  int n_done = 0, n_words = 0, n_pairs = 0, n_discard = 0, n_corrupt = 0, n_loss = 0;
  int n_overlap = 0, n_bad = 0;
  logic cmp_en = 1;
  ts_t last_ts;

  function automatic logic older(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("%0t FAIL: %s", $time, s);
  endtask

  initial begin
    #400_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected words of one trigger
  task automatic expect_trig(input trig_t t, output trig_word_t e [$]);
    ts_t s, en;
    s  = {t.start, {FINE_W{1'b0}}};
    en = s + {cfg.window, {FINE_W{1'b0}}};
    e = {};
    for (int i = 0; i < hits.size(); i++) begin
      trig_word_t w;
      if (hits[i].bad) continue;
      if (older(hits[i].ts, s) || !older(hits[i].ts, en)) continue;
      if (cfg.pairing && hits[i].trailing) continue;
      w = '0;
      w.evt = t.evt;
      w.trailing = hits[i].trailing;
      w.ts = cfg.relative ? hits[i].ts - s : hits[i].ts;
      e.push_back(w);
      if (cfg.pairing && i + 1 < hits.size() && hits[i+1].trailing && !hits[i+1].bad) begin
        w.trailing = 1;
        w.ts = cfg.relative ? hits[i+1].ts - s : hits[i+1].ts;
        e.push_back(w);
      end
    end
  endtask

  // monitor at the rising edge
  always @(posedge clk) if (rst_n) begin
    if (trig_valid && cfg.triggered) begin
      if (tq.size() < 4) tq.push_back('{start: trig_start, evt: trig_evt});
    end
    if (ev_discard) n_discard++;
    if (ev_corrupt) n_corrupt++;
    if (out_valid && out_ready) begin
      n_words++;
      if (!out_last) n_pairs++;
      if (out_word.loss) n_loss++;
      if (!cfg.triggered) begin
        if (out_word.loss) ;
        else if (unt_exp.size() == 0) fail("untriggered: unexpected word");
        else begin
          trig_word_t e;
          e = unt_exp.pop_front();
          checks++;
          if (out_word !== e) fail($sformatf("untriggered: got ts %0d exp %0d", out_word.ts, e.ts));
        end
      end else if (!out_word.loss) got.push_back(out_word);
    end
    if (ev_done) begin
      n_done++;
      if (tq.size() == 0) fail("ev_done with no trigger");
      else begin
        trig_t t;
        trig_word_t e [$];
        t = tq.pop_front();
        if (cmp_en) begin
          expect_trig(t, e);
          checks++;
          if (e.size() != got.size()) fail($sformatf("evt %0d: %0d words, expected %0d", t.evt, got.size(), e.size()));
          else foreach (e[i]) if (e[i] !== got[i]) fail($sformatf("evt %0d word %0d: ts %0d exp %0d tr %b/%b",
                                   t.evt, i, got[i].ts, e[i].ts, got[i].trailing, e[i].trailing));
        end
        got = {};
      end
    end
  end

  // drive a hit word at the falling edge (one cycle)
  task automatic write_word(input ts_t ts, input logic tr, input logic bad_par);
    wr_en = 1;
    wr_data.ts = ts;
    wr_data.trailing = tr;
    wr_data.par = l1_parity(tr, ts) ^ bad_par;
  endtask

  task automatic do_reset(input trig_cfg_t c);
    @(negedge clk);
    rst_n = 0;
    cfg = c;
    hits = {}; tq = {}; got = {}; unt_exp = {};
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_ts = {now - 22'd3, 5'd0};
  endtask

  // one cycle of stimulus: hit with probability 1/hp, trigger with 1/tp;
  // in pairing mode the hits are pulses (leading, then trailing)
  logic pulse_open = 0;
  task automatic cycle(input int hp, input int tp);
    @(negedge clk);
    wr_en = 0;
    trig_valid = 0;
    now = now + 1'b1;
    if ($urandom_range(1, hp) == 1) begin
      ts_t ts;
      ts = {now - 22'd2, 5'($urandom)};
      if (older(last_ts, ts)) begin
        logic tr;
        tr = cfg.pairing ? pulse_open : 1'($urandom);
        write_word(ts, tr, 0);
        hits.push_back('{ts: ts, trailing: tr, bad: 0});
        if (!cfg.triggered) begin
          trig_word_t e;
          e = '0; e.ts = ts; e.trailing = tr;
          unt_exp.push_back(e);
        end
        last_ts = ts;
        pulse_open = cfg.pairing && !pulse_open;
      end
    end
    if (tp > 0 && $urandom_range(1, tp) == 1) begin
      trig_valid = 1;
      trig_start = now - cfg.latency;
      trig_evt = trig_evt + 1'b1;
    end
    if (hits.size() > 3000) void'(hits.pop_front());
  endtask

  task automatic idle(input int n);
    repeat (n) cycle(1 << 30, 0);
  endtask

  task automatic random_phase(input int n, input int hp, input int tp);
    for (int i = 0; i < n; i++) begin
      cycle(hp, tp);
      // now and then a second trigger soon after, overlapping windows
      if (trig_valid && $urandom_range(0, 3) == 0) begin
        int k;
        k = $urandom_range(1, 20);
        repeat (k) cycle(hp, 0);
        cycle(hp, 1);
        n_overlap++;
        i += k + 1;
      end
    end
    idle(300);
  endtask

  initial begin
    trig_cfg_t c;
    wr_data = '0;
    trig_start = '0;
    now = 22'h3fffff - 22'd6000;
    c = '0;
    // phase 1
    c.triggered = 1; c.latency = 80; c.window = 40;
    do_reset(c);
    random_phase(12000, 6, 150);
    $display("phase 1: done %0d words %0d overlap %0d discard %0d", n_done, n_words, n_overlap, n_discard);
    checks++;
    if (n_done < 50 || n_words < 200 || n_discard < 500) fail("phase 1 coverage");
    // phase 2
    c.relative = 1; c.pairing = 1; c.latency = 60; c.window = 20;
    do_reset(c);
    n_pairs = 0;
    random_phase(12000, 4, 120);
    $display("phase 2: done %0d pairs %0d", n_done, n_pairs);
    checks++;
    if (n_pairs < 100) fail("phase 2 coverage");
    // phase 3: untriggered, parity errors, throughput
    c = '0;
    do_reset(c);
    n_corrupt = 0;
    for (int i = 0; i < 4000; i++) begin
      cycle(3, 0);
      if (i % 97 == 5) begin
        @(negedge clk);
        wr_en = 0;
        now = now + 1'b1;
        write_word({now - 22'd2, 5'd31}, 0, 1);
        hits.push_back('{ts: {now - 22'd2, 5'd31}, trailing: 0, bad: 1});
        last_ts = {now - 22'd2, 5'd31};
        n_bad++;
      end
    end
    idle(50);
    checks++;
    if (n_corrupt != n_bad) fail($sformatf("parity: %0d corrupt events for %0d bad words", n_corrupt, n_bad));
    checks++;
    if (unt_exp.size() != 0) fail("untriggered words not sent");
    // throughput: 16 words written back to back
    out_ready = 0;
    for (int i = 0; i < 16; i++) cycle(1, 0);
    @(negedge clk);
    wr_en = 0;
    out_ready = 1;
    begin
      int t0;
      t0 = 0;
      while (unt_exp.size() != 0 && t0 < 1000) begin @(negedge clk); t0++; end
      checks++;
      if (t0 > 36) fail($sformatf("16 words took %0d cycles", t0));
      $display("phase 3: bad %0d, 16-word burst in %0d cycles", n_bad, t0);
    end
    // phase 4: order error with no trigger pending
    c.triggered = 1; c.latency = 200; c.window = 40;
    do_reset(c);
    n_corrupt = 0; n_discard = 0;
    idle(5);
    @(negedge clk);
    now = now + 1'b1;
    write_word({now + 22'd5000, 5'd0}, 0, 0);   // far in the future: corrupt
    @(negedge clk);
    now = now + 1'b1;
    write_word({now - 22'd2, 5'd0}, 0, 0);
    @(negedge clk);
    now = now + 1'b1;
    write_word({now - 22'd2, 5'd1}, 0, 0);
    @(negedge clk);
    wr_en = 0;
    idle(400);
    checks++;
    if (n_corrupt != 1 || n_discard != 1 || count != 0)
      fail($sformatf("order error: corrupt %0d discard %0d count %0d", n_corrupt, n_discard, count));
    // phase 5: overflow of the buffer and of the trigger queue
    c.latency = 300; c.window = 250;
    do_reset(c);
    cmp_en = 0;
    n_loss = 0;
    begin
      int acc0;
      repeat (100) cycle(1, 0);        // 100 hits into a 32-word buffer
      repeat (6) cycle(1 << 30, 1);    // six triggers, queue holds four
      idle(2000);
      checks++;
      if (n_loss < 1) fail("no loss word");
      checks++;
      if (tq.size() != 0) fail("accepted triggers not completed");
      checks++;
      if (lost || dut.tq_lost_q) fail("loss flags not cleared");
      $display("phase 5: loss words %0d", n_loss);
    end
    // after the loss, normal operation again
    cmp_en = 1;
    c.latency = 80; c.window = 40;
    do_reset(c);
    begin
      int d0_;
      d0_ = n_done;
      random_phase(3000, 6, 100);
      checks++;
      if (n_done - d0_ < 10) fail("no triggers after recovery");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
