`timescale 1ps/1fs
// hit_controller: turns a channel's hit input into the store pulse of its
// hit register bank.
//
// For every edge of the hit input that is to be measured (leading, trailing
// or both, by configuration) the controller raises ctrl; the rising edge of
// ctrl makes the hit register bank store the time base. ctrl stays high, and
// further edges are ignored, until the synchronous transfer logic has copied
// the stored timestamp and answers with ack, which clears ctrl asynchronously
// so the registers are ready for the next hit (the delay the document calls
// dt1; it does not affect the measurement). A disabled channel never raises
// ctrl and so never stores anything or uses readout bandwidth.
//
// The edge selection, per-channel enable and the capture/store cycle follow
// the document. It also describes a low-power mode in which the registers
// capture only for a fixed analog delay dt2 after the hit; that delay is a
// full-custom circuit and is not part of this RTL: the controller implements
// the high-precision mode, where the time base is sampled at the hit edge.
//
// Interface: hit_in is asynchronous. ack and rst are asynchronous clears,
// active high. trailing tells which edge set ctrl and is stable while ctrl is
// high. The set flops are clocked by the hit input itself.
module hit_controller
  import tdc_pkg::*;
(
  input  logic      hit_in,
  input  logic      rst,
  input  logic      enable,
  input  edge_sel_e edge_sel,
  input  logic      ack,
  output logic      ctrl,
  output logic      trailing
);

  logic lead_q, trail_q;
  logic clr;

  assign clr = rst | ack;

  always_ff @(posedge hit_in or posedge clr) begin
    if (clr) lead_q <= 1'b0;
    else if (enable && !trail_q &&
             (edge_sel == EDGE_LEADING || edge_sel == EDGE_BOTH))
      lead_q <= 1'b1;
  end

  always_ff @(negedge hit_in or posedge clr) begin
    if (clr) trail_q <= 1'b0;
    else if (enable && !lead_q &&
             (edge_sel == EDGE_TRAILING || edge_sel == EDGE_BOTH))
      trail_q <= 1'b1;
  end

  assign ctrl     = lead_q | trail_q;
  assign trailing = trail_q;

endmodule
