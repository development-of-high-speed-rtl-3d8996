`timescale 1ps/1fs
// channel_merger: merges the selected data of all channels into one stream.
//
// Only one channel at a time can use the common readout. As the document
// prescribes, an enable (a token) is passed around the channels that have
// data to send: the token holder sends while it has data, then the token
// moves on to the next channel, in increasing channel order, that has data.
// A channel sending a leading/trailing pair keeps the token until the second
// word (in_last low marks the first). The merger is placed after the
// level-1 buffers and the trigger logic, so what it merges is already
// reduced; its ready signal is the wait signal of the trigger state
// machines. Round-robin order and the one-word-per-cycle rate are this
// design's choices.
//
// Interface: per channel a valid/ready stream with a last flag; one merged
// valid/ready stream tagged with the channel number. Combinational from
// inputs to outputs; the token is registered.
module channel_merger
  import tdc_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       in_valid,
  output logic [N-1:0]       in_ready,
  input  trig_word_t         in_word [N],
  input  logic [N-1:0]       in_last,
  output logic               out_valid,
  input  logic               out_ready,
  output merge_word_t        out_word,
  output logic               out_last
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] tok_q, grant;
  logic          lock_q, any;

  always_comb begin
    grant = tok_q;
    any   = 1'b0;
    if (lock_q) begin
      any = in_valid[tok_q];
    end else begin
      for (int i = N - 1; i >= 0; i--) begin
        if (in_valid[(32'(tok_q) + i) % N]) begin
          grant = IW'((32'(tok_q) + i) % N);
          any   = 1'b1;
        end
      end
    end
    out_valid   = any;
    out_word.ch = CH_W'(grant);
    out_word.w  = in_word[grant];
    out_last    = in_last[grant];
    in_ready    = '0;
    in_ready[grant] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q  <= '0;
      lock_q <= 1'b0;
    end else if (out_valid && out_ready) begin
      lock_q <= !out_last;
      tok_q  <= out_last ? IW'((32'(grant) + 1) % N) : grant;
    end
  end

endmodule
