`timescale 1ps/1fs
// hit_transfer: moves a stored hit from the asynchronous hit registers into
// the synchronous level-1 buffer, encoding it on the way.
//
// The hit registers are clocked by the hits; the level-1 buffer runs on the
// logic clock, so the document requires a synchronisation in the hit
// register pipeline and places the encoding of the raw time base (the
// thermometer-like DLL pattern) before the level-1 buffer to keep its words
// narrow. This module does both:
//   1. ctrl (high while the hit registers hold an unread hit) passes a
//      two-flop synchroniser.
//   2. Once it is seen high, the raw registers, which have been stable since
//      ctrl rose, are copied into a second register stage (the pipeline stage
//      of the document) and ack is raised; ack frees the hit registers.
//   3. The copy is encoded: the fine time is the DLL tap k with tap[k]=1 and
//      tap[k+1]=0, the position of the clock's rising edge in the line; the
//      coarse Gray count is converted to binary; a parity bit is added (the
//      document suggests parity for the level-1 buffer). The word is written
//      to the level-1 buffer one cycle after the copy.
//   4. ack is held until the synchronised ctrl is low again.
// The encoding rule, the handshake and the parity are this design's choices
// within what the document describes.
//
// Timing: from ctrl rising to the level-1 write takes 4 logic-clock cycles;
// the channel can take the next hit about 6 cycles after the previous one.
module hit_transfer
  import tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ctrl,        // asynchronous, from hit_controller
  input  logic                trailing,    // stable while ctrl is high
  input  logic [COARSE_W-1:0] raw_coarse,  // Gray, from hit registers
  input  logic [TAPS-1:0]     raw_taps,    // DLL pattern, from hit registers
  output logic                ack,
  output logic                wr_en,
  output l1_word_t            wr_data
);

  logic [1:0]          sync_q;
  logic                busy_q, stage_v_q;
  logic [COARSE_W-1:0] st_coarse_q;
  logic [TAPS-1:0]     st_taps_q;
  logic                st_trail_q;

  // Position of the rising edge in the captured DLL pattern.
  function automatic logic [FINE_W-1:0] fine_of(logic [TAPS-1:0] t);
    logic [FINE_W-1:0] f;
    f = '0;
    for (int k = TAPS - 1; k >= 0; k--)
      if (t[k] && !t[(k + 1) % TAPS]) f = FINE_W'(k);
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q      <= '0;
      busy_q      <= 1'b0;
      stage_v_q   <= 1'b0;
      st_coarse_q <= '0;
      st_taps_q   <= '0;
      st_trail_q  <= 1'b0;
      ack         <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], ctrl};
      stage_v_q <= 1'b0;
      if (!busy_q && sync_q[1]) begin
        st_coarse_q <= raw_coarse;
        st_taps_q   <= raw_taps;
        st_trail_q  <= trailing;
        stage_v_q   <= 1'b1;
        busy_q      <= 1'b1;
        ack         <= 1'b1;
      end else if (busy_q && !sync_q[1]) begin
        busy_q <= 1'b0;
        ack    <= 1'b0;
      end
    end
  end

  always_comb begin
    wr_en            = stage_v_q;
    wr_data.trailing = st_trail_q;
    wr_data.ts       = {gray2bin(st_coarse_q), fine_of(st_taps_q)};
    wr_data.par      = l1_parity(wr_data.trailing, wr_data.ts);
  end

endmodule
