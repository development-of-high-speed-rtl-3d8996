`timescale 1ps/1fs
// clock_divider: frequency divider in the PLL feedback path.
//
// Divides the VCO clock by DIV (32: 1.28 GHz down to the 40 MHz reference)
// with a counter; the output is high for the first half of the count. The
// division ratio is the document's; the counter form is this design's.
//
// Interface: clk_in is the VCO clock, rst_n asynchronous; clk_out is
// registered on clk_in.
module clock_divider #(
  parameter int unsigned DIV = 32
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned W = (DIV > 2) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt_q   <= (cnt_q == W'(DIV - 1)) ? '0 : cnt_q + 1'b1;
      clk_out <= (cnt_q == W'(DIV - 1)) || (cnt_q < W'(DIV / 2 - 1));
    end
  end

endmodule
