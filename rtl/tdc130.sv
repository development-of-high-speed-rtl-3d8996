`timescale 1ps/1fs
// tdc130: the TDC130 target chip, a 32-channel data-driven, triggered
// time-to-digital converter with 24.4 ps bins.
//
// Time base: the PLL makes 1.28 GHz from the 40 MHz reference, the DLL
// splits each 781.25 ps period into 32 bins, and a Gray-coded coarse
// counter on the 1.28 GHz clock counts the periods. Together they give a
// 27-bit timestamp (22 coarse + 5 fine bits, 3.3 ms range).
// Channels (tdc_channel, N_CH of them): each selected hit edge stores the
// time base in the channel's hit registers; the stored pattern is
// synchronised to the logic clock, encoded and written to the channel's own
// level-1 buffer; a per-channel trigger state machine sends the hits that
// fall in a trigger's window. trigger_gen turns the trigger input into the
// window start (arrival time - latency); coarse_sync carries the coarse
// time into the logic clock domain. The channel merger passes a token
// among the channels with data, and the readout buffer forms pulse widths
// in pairing mode and holds the words for the readout link.
//
// From the document: this organisation, 32 channels, 32 DLL elements,
// 1.28 GHz, the 27-bit word, one 32-word level-1 buffer per channel,
// triggering with latency and window, overlapping triggers, pairing mode,
// loss signalling and token-passing merging. This design's: the logic
// clock is a separate input of any frequency (the document does not give
// it), the configuration is a set of input ports (the document gives no
// configuration interface for this chip), the readout word and handshake.
// The PLL and DLL are behavioural models; everything else is synthesizable.
//
// Interface: ref_clk 40 MHz; clk_logic logic clock; rst_n asynchronous,
// active low; hit[] and trigger asynchronous; ro_* a valid/ready stream of
// tdc_pkg::ro_word_t on clk_logic.
module tdc130
  import tdc_pkg::*;
#(
  parameter int unsigned N          = N_CH,
  parameter int unsigned L1_DEPTH   = 32,
  parameter int unsigned TQ_DEPTH   = 4,
  parameter int unsigned RO_DEPTH   = 64
) (
  input  logic                ref_clk,
  input  logic                clk_logic,
  input  logic                rst_n,
  input  logic [N-1:0]        hit,
  input  logic                trigger,
  input  logic [N-1:0]        ch_enable,
  input  edge_sel_e           edge_sel,
  input  trig_cfg_t           cfg,
  input  logic [3*TAPS-1:0]   dll_cal,
  input  logic [1:0]          dll_icp_sel,
  output logic                dll_tracking,
  output logic                ro_valid,
  input  logic                ro_ready,
  output ro_word_t            ro_word,
  // monitoring: divided PLL clock and per-channel event pulses
  output logic                test_clk_div,
  output logic [N-1:0]        mon_discard,   // hit dropped, not triggered
  output logic [N-1:0]        mon_corrupt,   // word skipped: parity or order
  output logic [N-1:0]        mon_done,      // trigger completed
  output logic [N-1:0]        mon_overflow   // level-1 buffer full, hit lost
);

  logic                clk1280, clk_div, dll_out, late, early;
  logic                precharge, cp_up, cp_dn;
  logic [TAPS-1:0]     taps;
  logic [COARSE_W-1:0] coarse_gray, now, trig_start;
  logic                trig_valid;
  logic [EVT_W-1:0]    trig_evt;

  logic [N-1:0]        ch_valid, ch_ready, ch_last;
  trig_word_t          ch_word [N];
  logic                m_valid, m_ready, m_last;
  merge_word_t         m_word;

  // time base
  pll_model u_pll (.ref_clk, .rst_n, .clk_vco(clk1280), .clk_div);

  assign test_clk_div = clk_div;

  dll_model #(.N(TAPS)) u_dll (
    .clk_in(clk1280), .precharge, .cp_up, .cp_dn,
    .icp_sel(dll_icp_sel), .cal(dll_cal),
    .taps, .clk_out(dll_out), .late, .early
  );

  dll_startup_fsm u_start (
    .clk(dll_out), .rst_n, .late, .force_en(1'b0), .force_dn(1'b0),
    .precharge, .cp_up, .cp_dn, .tracking(dll_tracking)
  );

  coarse_counter u_cnt (.clk(clk1280), .rst_n, .gray(coarse_gray));

  // logic clock domain
  coarse_sync u_sync (.clk(clk_logic), .rst_n, .gray_in(coarse_gray), .now);

  trigger_gen u_tg (
    .clk(clk_logic), .rst_n, .trigger_in(trigger), .now, .latency(cfg.latency),
    .trig_valid, .trig_start, .trig_evt
  );

  for (genvar c = 0; c < N; c++) begin : g_ch
    tdc_channel #(.L1_DEPTH(L1_DEPTH), .TQ_DEPTH(TQ_DEPTH)) u_ch (
      .clk(clk_logic), .rst_n, .hit_in(hit[c]), .taps, .coarse_gray,
      .enable(ch_enable[c]), .edge_sel, .cfg, .now,
      .trig_valid, .trig_start, .trig_evt,
      .out_valid(ch_valid[c]), .out_ready(ch_ready[c]),
      .out_word(ch_word[c]), .out_last(ch_last[c]),
      .ev_discard(mon_discard[c]), .ev_corrupt(mon_corrupt[c]),
      .ev_done(mon_done[c]), .l1_overflow(mon_overflow[c])
    );
  end

  channel_merger #(.N(N)) u_merge (
    .clk(clk_logic), .rst_n, .in_valid(ch_valid), .in_ready(ch_ready),
    .in_word(ch_word), .in_last(ch_last),
    .out_valid(m_valid), .out_ready(m_ready), .out_word(m_word), .out_last(m_last)
  );

  readout_buffer #(.DEPTH(RO_DEPTH)) u_ro (
    .clk(clk_logic), .rst_n, .in_valid(m_valid), .in_ready(m_ready),
    .in_word(m_word), .in_last(m_last),
    .out_valid(ro_valid), .out_ready(ro_ready), .out_word(ro_word)
  );

endmodule
