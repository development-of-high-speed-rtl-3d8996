`timescale 1ps/1fs
// l1_buffer: a channel's level-1 buffer.
//
// Holds the encoded hit timestamps of one channel during the trigger latency.
// The document gives every channel its own buffer (1024 words for the chip,
// so 32 words per channel) because that costs less power than one shared
// buffer and keeps each buffer's words in time order, which the trigger logic
// relies on. It is a circular buffer written in arrival order. Unlike a plain
// FIFO it offers two read ports addressed relative to the oldest word, so
// the trigger logic can look at the oldest word and its successor (to find
// words out of time order) and scan ahead through a trigger window without
// consuming the words; pop removes one or two words from the front.
//
// A write into a full buffer is dropped and sets the sticky flag lost, which
// the trigger logic reports as a loss marker and clears with lost_clr: the
// document requires that lost data be signalled. The buffer is a register
// array with asynchronous reads, standing in for the generated memory.
//
// Interface: all signals on clk. count is the number of words held.
// rd_data0/1 are the words at offsets rd_off0/1 from the oldest word, valid
// in the same cycle when the offset is below count.
module l1_buffer
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  l1_word_t                   wr_data,
  input  logic [1:0]                 pop,       // words to remove, 0..2
  input  logic [$clog2(DEPTH+1)-1:0] rd_off0,
  input  logic [$clog2(DEPTH+1)-1:0] rd_off1,
  output l1_word_t                   rd_data0,
  output l1_word_t                   rd_data1,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       lost,
  input  logic                       lost_clr
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  l1_word_t      mem [DEPTH];
  logic [AW-1:0] wr_ptr_q, rd_ptr_q;
  logic [CW-1:0] count_q;
  logic          do_wr;
  logic [CW-1:0] n_pop;

  assign do_wr = wr_en && (count_q != CW'(DEPTH));
  assign n_pop = (CW'(pop) > count_q) ? count_q : CW'(pop);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
      lost     <= 1'b0;
    end else begin
      if (do_wr) wr_ptr_q <= AW'((32'(wr_ptr_q) + 1) % DEPTH);
      rd_ptr_q <= AW'((32'(rd_ptr_q) + 32'(n_pop)) % DEPTH);
      count_q  <= count_q + CW'(do_wr) - n_pop;
      if (wr_en && !do_wr) lost <= 1'b1;
      else if (lost_clr)   lost <= 1'b0;
    end
  end

  assign rd_data0 = mem[AW'((32'(rd_ptr_q) + 32'(rd_off0)) % DEPTH)];
  assign rd_data1 = mem[AW'((32'(rd_ptr_q) + 32'(rd_off1)) % DEPTH)];
  assign count    = count_q;

endmodule
