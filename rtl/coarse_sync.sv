`timescale 1ps/1fs
// coarse_sync: brings the Gray-coded coarse time into the logic clock domain.
//
// At any instant at most one bit of a Gray counter is changing, so a
// two-flop synchroniser yields either the value before or the value after
// that change, never a mixture. The synchronised code is then converted to
// binary for the trigger arithmetic. This block is this design's own; the
// document only requires that the logic clock domain know the time.
//
// Interface: gray_in comes from the 1.28 GHz domain; now is registered on
// clk, three cycles late plus the time since the last count.
module coarse_sync
  import tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COARSE_W-1:0] gray_in,
  output logic [COARSE_W-1:0] now
);

  logic [COARSE_W-1:0] s0_q, s1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q <= '0;
      s1_q <= '0;
      now  <= '0;
    end else begin
      s0_q <= gray_in;
      s1_q <= s0_q;
      now  <= gray2bin(s1_q);
    end
  end

endmodule
