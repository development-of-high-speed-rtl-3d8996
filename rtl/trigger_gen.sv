`timescale 1ps/1fs
// trigger_gen: turns the external trigger signal into a trigger timestamp.
//
// The trigger refers to an event that happened one trigger latency before
// the trigger reached the chip. On each rising edge of the (synchronised)
// trigger input this block computes the start of the trigger window,
// start = now - latency, in coarse counts, numbers the trigger with an
// 8-bit event number, and announces both to all channels for one cycle.
// That the trigger timestamp takes the latency into account and need not
// have the hit resolution is the document's; the coarse resolution, the
// two-flop synchroniser and the event numbering are this design's.
//
// Interface: trigger_in is asynchronous to clk. now is the coarse time in
// the logic domain. trig_valid pulses 3 cycles after the trigger rises.
module trigger_gen
  import tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trigger_in,
  input  logic [COARSE_W-1:0] now,
  input  logic [COARSE_W-1:0] latency,
  output logic                trig_valid,
  output logic [COARSE_W-1:0] trig_start,
  output logic [EVT_W-1:0]    trig_evt
);

  logic [2:0]       sync_q;
  logic [EVT_W-1:0] evt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q     <= '0;
      evt_q      <= '0;
      trig_valid <= 1'b0;
      trig_start <= '0;
      trig_evt   <= '0;
    end else begin
      sync_q     <= {sync_q[1:0], trigger_in};
      trig_valid <= 1'b0;
      if (sync_q[1] && !sync_q[2]) begin
        trig_valid <= 1'b1;
        trig_start <= now - latency;
        trig_evt   <= evt_q;
        evt_q      <= evt_q + 1'b1;
      end
    end
  end

endmodule
