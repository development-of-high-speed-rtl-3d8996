`timescale 1ps/1fs
// coarse_counter: Gray-coded coarse time counter of the TDC time base.
//
// The DLL only resolves a time within one period of the 1.28 GHz clock; this
// counter extends the dynamic range by counting those periods, as the time
// base chosen for the chip prescribes (a DLL with a counter for dynamic range
// extension). It counts the rising edges of the DLL input clock and keeps the
// count in Gray code, so that a hit register sampling it while it changes can
// at worst be off by one count: only one bit toggles per step. The Gray code
// is the document's suggestion for counter-based time bases; its use here and
// the width of 22 bits (27-bit timestamp less the 5 fine bits) are this
// design's reading.
//
// Interface: clk is the 1.28 GHz time-base clock, rst_n an asynchronous
// active-low reset that clears the count to zero. gray is registered and
// changes one clock after each rising clk edge.
module coarse_counter #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] gray
);

  logic [W-1:0] bin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q <= '0;
      gray  <= '0;
    end else begin
      bin_q <= bin_q + 1'b1;
      gray  <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

endmodule
