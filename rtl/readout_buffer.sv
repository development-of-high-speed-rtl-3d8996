`timescale 1ps/1fs
// readout_buffer: the readout FIFO of the chip, with pulse-width calculation.
//
// Words from the channel merger are stored here until the readout link takes
// them. In pairing mode a leading timestamp arrives followed by its trailing
// timestamp (the leading word carries last = 0); the document places the
// conversion of such a pair into a leading timestamp and a pulse width
// before the readout buffer, because the width needs a smaller range. The
// width is trailing - leading in bins, saturated to 16 bits. Single words
// become RO_HIT words, loss markers RO_LOSS words.
//
// The readout interface to the optical link was still open in the document,
// so the word layout (ro_word_t), the depth of 64 words and the valid/ready
// handshake are this design's.
//
// Interface: in_* and out_* are valid/ready streams on clk; in_ready falls
// when the FIFO is full. Latency from input to output is one cycle. DEPTH
// must be a power of two.
module readout_buffer
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  merge_word_t in_word,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output ro_word_t    out_word
);

  localparam int unsigned AW = $clog2(DEPTH);

  ro_word_t        mem [DEPTH];
  logic [AW-1:0]   wr_q, rd_q;
  logic [AW:0]     cnt_q;
  logic            lead_v_q;
  ts_t             lead_ts_q;
  logic            push, pop, hold;
  ro_word_t        wd;
  ts_t             diff;

  assign in_ready  = cnt_q != (AW+1)'(DEPTH);
  assign hold      = in_valid && in_ready && !in_last && !in_word.w.loss;
  assign push      = in_valid && in_ready && !hold;
  assign pop       = out_valid && out_ready;
  assign out_valid = cnt_q != 0;
  assign out_word  = mem[rd_q];

  always_comb begin
    diff        = in_word.w.ts - lead_ts_q;
    wd.ch       = in_word.ch;
    wd.evt      = in_word.w.evt;
    wd.trailing = in_word.w.trailing;
    wd.ts       = in_word.w.ts;
    wd.width    = '0;
    if (in_word.w.loss) begin
      wd.kind = RO_LOSS;
    end else if (lead_v_q) begin
      wd.kind     = RO_PAIR;
      wd.trailing = 1'b0;
      wd.ts       = lead_ts_q;
      wd.width    = (diff > ts_t'({WIDTH_W{1'b1}})) ? {WIDTH_W{1'b1}} : diff[WIDTH_W-1:0];
    end else begin
      wd.kind = RO_HIT;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= wd;
    if (hold) lead_ts_q <= in_word.w.ts;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q     <= '0;
      rd_q     <= '0;
      cnt_q    <= '0;
      lead_v_q <= 1'b0;
    end else begin
      if (push) wr_q <= wr_q + 1'b1;
      if (pop)  rd_q <= rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
      if (hold)      lead_v_q <= 1'b1;
      else if (push) lead_v_q <= 1'b0;
    end
  end

endmodule
