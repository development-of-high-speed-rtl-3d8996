`timescale 1ps/1fs
// tdc_channel: one channel macro of the target chip, from hit input to the
// channel merger.
//
// hit_controller -> hit_register_bank -> hit_transfer -> l1_buffer ->
// trigger_fsm. The hit controller turns each selected edge of the hit input
// into a store pulse; the hit register bank stores the time base at that
// pulse (32 DLL taps and the 22-bit Gray coarse count); the transfer logic
// synchronises, encodes and writes the 27-bit timestamp into the channel's
// own level-1 buffer; the trigger state machine selects the words to send.
// The chain is the document's channel organisation.
//
// Interface: hit_in is asynchronous; taps and coarse_gray are the time base
// (1.28 GHz domain); everything else is on the logic clock clk.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned L1_DEPTH = 32,
  parameter int unsigned TQ_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hit_in,
  input  logic [TAPS-1:0]     taps,
  input  logic [COARSE_W-1:0] coarse_gray,
  input  logic                enable,
  input  edge_sel_e           edge_sel,
  input  trig_cfg_t           cfg,
  input  logic [COARSE_W-1:0] now,
  input  logic                trig_valid,
  input  logic [COARSE_W-1:0] trig_start,
  input  logic [EVT_W-1:0]    trig_evt,
  output logic                out_valid,
  input  logic                out_ready,
  output trig_word_t          out_word,
  output logic                out_last,
  output logic                ev_discard,
  output logic                ev_corrupt,
  output logic                ev_done,
  output logic                l1_overflow
);

  localparam int unsigned CW = $clog2(L1_DEPTH + 1);

  logic                       ctrl, trailing, ack, wr_en;
  logic [COARSE_W+TAPS-1:0]   raw;
  l1_word_t                   wr_data, d0, d1;
  logic [CW-1:0]              off0, off1, count;
  logic [1:0]                 pop;
  logic                       lost, lost_clr;

  hit_controller u_hc (
    .hit_in, .rst(!rst_n), .enable, .edge_sel, .ack, .ctrl, .trailing
  );

  hit_register_bank #(.W(COARSE_W + TAPS)) u_hr (
    .hit_clk(ctrl), .rst_n, .d({coarse_gray, taps}), .q(raw)
  );

  hit_transfer u_xfer (
    .clk, .rst_n, .ctrl, .trailing,
    .raw_coarse(raw[COARSE_W+TAPS-1:TAPS]), .raw_taps(raw[TAPS-1:0]),
    .ack, .wr_en, .wr_data
  );

  l1_buffer #(.DEPTH(L1_DEPTH)) u_l1 (
    .clk, .rst_n, .wr_en, .wr_data, .pop,
    .rd_off0(off0), .rd_off1(off1), .rd_data0(d0), .rd_data1(d1),
    .count, .lost, .lost_clr
  );

  trigger_fsm #(.L1_DEPTH(L1_DEPTH), .TQ_DEPTH(TQ_DEPTH)) u_trig (
    .clk, .rst_n, .cfg, .now, .trig_valid, .trig_start, .trig_evt,
    .l1_count(count), .l1_data0(d0), .l1_data1(d1),
    .l1_off0(off0), .l1_off1(off1), .l1_pop(pop),
    .l1_lost(lost), .l1_lost_clr(lost_clr),
    .out_valid, .out_ready, .out_word, .out_last,
    .ev_discard, .ev_corrupt, .ev_done
  );

  assign l1_overflow = wr_en && count == CW'(L1_DEPTH);

endmodule
