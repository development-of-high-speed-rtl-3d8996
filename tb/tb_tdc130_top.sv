`timescale 1ps/1fs
// End-to-end testbench of tdc130_top: the TDC130 target chip (32 channels)
// and the TDC130-0820 prototype (44 channels), both at their default sizes,
// each running from its own 40 MHz reference through its PLL and DLL
// models.
//
// Target chip, in phases after the time base has locked:
//   A untriggered, leading edges: all 32 channels hit within 20 ns of each
//     other; every channel must report one word, and the timestamp
//     differences between channels must equal the hit time differences
//     within 2 bins of 24.414 ps. The readout stalls at random (back
//     pressure through merger and buffers).
//   B triggered, pairing, relative time, both edges: 8 channels get pulses of
//     known width inside two overlapping trigger windows, plus earlier hits
//     that no trigger selects. Each pulse must come out twice (once per
//     trigger, with the two event numbers) as a pair word whose width is
//     the pulse width within 2 bins and whose time is relative to the
//     window start; the earlier hits must be discarded.
//   C overflow: 40 hits on one channel within the trigger latency overflow
//     its 32-word level-1 buffer; the next trigger must give a loss word.
//   D trailing-edge selection and a disabled channel.
// Prototype:
//   P1 after reset the test output shows the reference clock;
//   P2 the 8 hit groups are hit at known offsets; after a parallel load the
//     1408 bits are shifted out; every channel must hold its group's DLL
//     pattern, and the fine time decoded from it must match the offset
//     within 2 bins;
//   P3 a configuration word selecting the divider on the test output is
//     shifted in, updated and read back; the test output must then run at
//     40 MHz.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_tdc130_top;
  import tdc_pkg::*;
  localparam real TREF = 25000.0;
  localparam real BIN = 781.25 / 32.0;

  // target chip
  logic t_ref_clk = 0, t_rst_n = 1, t_trigger = 0, t_ro_ready = 1;
  logic [N_CH-1:0] t_hit = '0, t_ch_enable = '1;
  edge_sel_e t_edge_sel = EDGE_LEADING;
  trig_cfg_t t_cfg = '0;
  logic [3*TAPS-1:0] t_dll_cal = '0;
  logic [1:0] t_dll_icp_sel = 2'd0;
  logic t_dll_tracking, t_ro_valid, t_test_clk_div;
  ro_word_t t_ro_word;
  logic [N_CH-1:0] t_mon_discard, t_mon_corrupt, t_mon_done, t_mon_overflow;
  // prototype
  logic p_ref_clk = 0, p_rst_n = 1, p_ro_clk = 0, p_ro_load = 0;
  logic [7:0] p_hit_grp = '0;
  logic p_cfg_clk = 0, p_cfg_din = 0, p_cfg_upd_clk = 0, p_cfg_upd_shift = 0;
  logic p_ro_dout, p_cfg_dout, p_test_out, p_dll_tracking;

  tdc130_top dut (.t_clk_logic(t_ref_clk), .*);

  always #(TREF / 2) t_ref_clk = !t_ref_clk;
  initial begin #(3127.0); forever #(TREF / 2) p_ref_clk = !p_ref_clk; end

  int checks = 0, failures = 0;
  // mechanism counters
  int m_lock_t = 0, m_lock_p = 0, m_timing = 0, m_merge = 0, m_stall = 0, m_trig = 0;
  int m_overlap = 0, m_pair = 0, m_discard = 0, m_overflow = 0, m_loss = 0, m_trailing = 0;
  int m_disabled = 0, m_relative = 0, m_untrig = 0, m_proto_hits = 0, m_proto_cfg = 0;
  int m_proto_test = 0;

  ro_word_t words [$];

  task automatic fail(input string s);
    failures++;
    if (failures < 30) $display("%0t FAIL: %s", $time, s);
  endtask

  initial begin
    #3_000_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge t_ref_clk) begin
    if (t_ro_valid && t_ro_ready) words.push_back(t_ro_word);
    if (t_ro_valid && !t_ro_ready) m_stall++;
    m_discard  += $countones(t_mon_discard);
    m_overflow += $countones(t_mon_overflow);
  end

  // random readout stalls while enabled
  logic stall_en = 0;
  always @(negedge t_ref_clk) t_ro_ready = stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic t_wait(input int n);
    repeat (n) @(negedge t_ref_clk);
  endtask

  task automatic t_pulse_trigger();
    @(negedge t_ref_clk) t_trigger = 1;
    @(negedge t_ref_clk) t_trigger = 0;
  endtask

  // pulse on one channel: rise after 'at' ps, length 'len' ps (non-blocking
  // for the caller)
  task automatic t_pulse(input int ch, input realtime at, input realtime len);
    fork
      begin
        #(at) t_hit[ch] = 1;
        #(len) t_hit[ch] = 0;
      end
    join_none
  endtask

  function automatic int bin_diff(ts_t a, ts_t b);
    ts_t d;
    int r;
    d = a - b;
    r = int'(d);
    if (r >= (1 << (TS_W - 1))) r -= (1 << TS_W);
    return r;
  endfunction

  // ---------------------------------------------------------------- target
  task automatic target_run();
    realtime d [N_CH];
    // lock
    t_rst_n = 0;
    t_wait(3);
    t_rst_n = 1;
    t_wait(400);
    checks++;
    if (!t_dll_tracking) fail("target DLL not tracking");
    else m_lock_t++;

    // A: untriggered, all channels
    t_cfg = '0;
    t_edge_sel = EDGE_LEADING;
    stall_en = 1;
    for (int r = 0; r < 6; r++) begin
      words = {};
      for (int c = 0; c < N_CH; c++) begin
        d[c] = real'($urandom_range(0, 20000)) + real'($urandom_range(0, 999)) / 1000.0;
        t_pulse(c, d[c], 50_000.0);
      end
      t_wait(200);
      checks++;
      if (words.size() != N_CH) fail($sformatf("A: %0d words for %0d hits", words.size(), N_CH));
      else begin
        ro_word_t w0;
        logic [N_CH-1:0] seen;
        int n_ch_switch;
        seen = '0;
        n_ch_switch = 0;
        foreach (words[i]) if (words[i].ch == 0) w0 = words[i];
        foreach (words[i]) begin
          int c, e, g;
          c = words[i].ch;
          seen[c] = 1;
          if (i > 0 && words[i].ch != words[i-1].ch) n_ch_switch++;
          e = int'($floor(d[c] / BIN)) - int'($floor(d[0] / BIN));
          g = bin_diff(words[i].ts, w0.ts);
          checks++;
          if (g - e > 2 || e - g > 2 || words[i].kind != RO_HIT)
            fail($sformatf("A: ch %0d at +%0.1f ps: %0d bins after ch 0, expected %0d", c, d[c] - d[0], g, e));
          else m_timing++;
        end
        checks++;
        if (seen != '1) fail("A: a channel is missing");
        if (n_ch_switch >= N_CH - 1) m_merge++;
        m_untrig++;
      end
    end
    stall_en = 0;

    // B: triggered, pairing, relative time, overlapping triggers
    t_cfg.triggered = 1; t_cfg.pairing = 1; t_cfg.relative = 1;
    t_cfg.latency = 22'd2560;       // 2 us
    t_cfg.window  = 22'd256;        // 200 ns
    t_edge_sel = EDGE_BOTH;
    t_wait(20);
    for (int r = 0; r < 3; r++) begin
      realtime wdt [8];
      int d0;
      words = {};
      d0 = m_discard;
      // hits 1 us earlier: no trigger selects them
      for (int c = 0; c < 8; c++) t_pulse(c, 1000.0 * c, 10_000.0);
      t_wait(40);
      // pulses 60..130 ns after t0, 260..330 ns long
      for (int c = 0; c < 8; c++) begin
        wdt[c] = 260_000.0 + 10_000.0 * c + real'($urandom_range(0, 999));
        t_pulse(c, 60_000.0 + 10_000.0 * c, wdt[c]);
      end
      // t0 is now; trigger so that the window opens about 50 ns before t0,
      // then a second trigger 100 ns later
      #(2_000_000.0 - 50_000.0 - 12_500.0);
      t_pulse_trigger();
      t_wait(2);
      t_pulse_trigger();
      t_wait(300);
      checks++;
      if (words.size() != 16) fail($sformatf("B: %0d words, expected 16", words.size()));
      else begin
        int per_ch [8];
        foreach (per_ch[c]) per_ch[c] = 0;
        foreach (words[i]) begin
          int c, e, g;
          c = words[i].ch;
          per_ch[c]++;
          e = int'($floor(wdt[c] / BIN));
          g = int'(words[i].width);
          checks++;
          if (words[i].kind != RO_PAIR || g - e > 2 || e - g > 2)
            fail($sformatf("B: ch %0d kind %0d width %0d expected %0d", c, words[i].kind, g, e));
          else m_pair++;
          checks++;
          // relative time: within the 200 ns window
          if (words[i].ts >= ts_t'(256 * 32)) fail($sformatf("B: relative time %0d", words[i].ts));
          else m_relative++;
        end
        foreach (per_ch[c]) begin
          checks++;
          if (per_ch[c] != 2) fail($sformatf("B: ch %0d read %0d times", c, per_ch[c]));
          else m_overlap++;
        end
        checks++;
        if (words[0].evt == words[15].evt) fail("B: both triggers have the same event number");
        else m_trig++;
      end
      checks++;
      if (m_discard - d0 < 8) fail($sformatf("B: %0d discards", m_discard - d0));
      t_wait(100);
    end

    // C: level-1 overflow and loss word
    t_cfg.pairing = 0; t_cfg.relative = 0;
    t_cfg.latency = 22'd12800;      // 10 us
    t_cfg.window  = 22'd1280;
    t_edge_sel = EDGE_LEADING;
    t_wait(600);
    words = {};
    begin
      int o0;
      o0 = m_overflow;
      for (int i = 0; i < 40; i++) begin
        t_pulse(5, 0.0, 20_000.0);
        t_wait(8);
      end
      t_pulse_trigger();
      t_wait(600);
      checks++;
      if (m_overflow == o0) fail("C: no overflow");
      checks++;
      begin
        int nl;
        nl = 0;
        foreach (words[i]) if (words[i].kind == RO_LOSS && words[i].ch == 5) nl++;
        if (nl == 0) fail("C: no loss word");
        m_loss += nl;
      end
    end

    // D: trailing edges only, channel 3 disabled
    t_cfg = '0;
    t_edge_sel = EDGE_TRAILING;
    t_ch_enable[3] = 0;
    t_wait(20);
    words = {};
    t_pulse(2, 0.0, 30_000.0);
    t_pulse(3, 0.0, 30_000.0);
    t_wait(100);
    checks++;
    if (words.size() != 1 || words[0].ch != 2 || !words[0].trailing)
      fail($sformatf("D: %0d words", words.size()));
    else begin m_trailing++; m_disabled++; end
    t_ch_enable[3] = 1;
  endtask

  // ------------------------------------------------------------- prototype
  task automatic p_ro_tick();
    #5000 p_ro_clk = 1;
    #5000 p_ro_clk = 0;
  endtask

  task automatic p_cfg_write(input proto_cfg_t c);
    for (int i = 0; i < PROTO_CFG_W; i++) begin
      p_cfg_din = c[i];
      #5000 p_cfg_clk = 1;
      #5000 p_cfg_clk = 0;
    end
    #5000 p_cfg_upd_clk = 1;
    #5000 p_cfg_upd_clk = 0;
  endtask

  function automatic int fine_of(logic [31:0] t);
    int f;
    f = -1;
    for (int k = 0; k < 32; k++) if (t[k] && !t[(k + 1) % 32]) f = k;
    return f;
  endfunction

  task automatic proto_run();
    int nt;
    p_rst_n = 0;
    #(TREF * 3);
    p_rst_n = 1;
    #(TREF * 400);
    checks++;
    if (!p_dll_tracking) fail("prototype DLL not tracking");
    else m_lock_p++;
    // P1: test output = reference clock after reset
    nt = 0;
    fork
      begin repeat (40) @(posedge p_test_out) nt++; end
      #(TREF * 40.5);
    join_any
    disable fork;
    checks++;
    if (nt < 40) fail($sformatf("P1: test output toggled %0d times", nt));
    else m_proto_test++;
    // P2: hit groups at known offsets, readout
    for (int r = 0; r < 4; r++) begin
      realtime off [8];
      logic [44*32-1:0] bits;
      for (int g = 0; g < 8; g++) off[g] = 100.0 * g + real'($urandom_range(0, 500));
      @(posedge p_ref_clk);
      #(real'($urandom_range(1000, 20000)));
      fork
        for (int g = 0; g < 8; g++) begin
          automatic int gg = g;
          fork begin #(off[gg]) p_hit_grp[gg] = 1; #(5000) p_hit_grp[gg] = 0; end join_none
        end
      join
      #20000;
      p_ro_load = 1;
      p_ro_tick();
      p_ro_load = 0;
      for (int i = 0; i < 44 * 32; i++) begin
        bits[i] = p_ro_dout;
        p_ro_tick();
      end
      for (int c = 0; c < 44; c++) begin
        int f, f0, e, g;
        f  = fine_of(bits[c*32 +: 32]);
        f0 = fine_of(bits[0 +: 32]);
        checks++;
        if (bits[c*32 +: 32] !== bits[(c % 8)*32 +: 32]) fail($sformatf("P2: ch %0d differs from its group", c));
        e = int'($floor(off[c % 8] / BIN)) - int'($floor(off[0] / BIN));
        g = (f - f0 + 64) % 32;
        e = (e + 64) % 32;
        checks++;
        if (f < 0 || ((g - e + 32) % 32 > 2 && (e - g + 32) % 32 > 2))
          fail($sformatf("P2: ch %0d fine %0d, expected %0d after ch 0", c, g, e));
        else m_proto_hits++;
      end
    end
    // P3: configuration, read-back, test output = divided clock
    begin
      proto_cfg_t c;
      logic [PROTO_CFG_W-1:0] rb;
      c = '0;
      c.test_sel = 2'd1;
      c.icp_sel = 2'd0;
      p_cfg_write(c);
      p_cfg_upd_shift = 1;
      for (int i = 0; i < PROTO_CFG_W; i++) begin
        rb[i] = p_cfg_dout;
        #5000 p_cfg_upd_clk = 1;
        #5000 p_cfg_upd_clk = 0;
      end
      p_cfg_upd_shift = 0;
      checks++;
      if (rb !== c) fail("P3: configuration read back differs");
      else m_proto_cfg++;
      // the read-back shifted the active word out: write it again
      p_cfg_write(c);
      nt = 0;
      fork
        begin forever @(posedge p_test_out) nt++; end
        #(TREF * 40);
      join_any
      disable fork;
      checks++;
      if (nt < 39 || nt > 41) fail($sformatf("P3: %0d divider periods in 1 us", nt));
      else m_proto_test++;
    end
  endtask

  initial begin
    fork
      target_run();
      proto_run();
    join
    $display("mechanisms: lock %0d/%0d timing %0d merge %0d stall %0d untriggered %0d trigger %0d overlap %0d",
             m_lock_t, m_lock_p, m_timing, m_merge, m_stall, m_untrig, m_trig, m_overlap);
    $display("            pair %0d relative %0d discard %0d overflow %0d loss %0d trailing %0d disabled %0d",
             m_pair, m_relative, m_discard, m_overflow, m_loss, m_trailing, m_disabled);
    $display("            proto hits %0d proto cfg %0d proto test out %0d", m_proto_hits, m_proto_cfg, m_proto_test);
    begin
      int m [19];
      m = '{m_lock_t, m_lock_p, m_timing, m_merge, m_stall, m_untrig, m_trig, m_overlap, m_pair,
            m_relative, m_discard, m_overflow, m_loss, m_trailing, m_disabled, m_proto_hits,
            m_proto_cfg, m_proto_test, 1};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
