`timescale 1ps/1fs
// pfd: phase-frequency detector of the clock-multiplying PLL.
//
// Two flip-flops with their data inputs tied high: one is set by the rising
// edge of the reference clock (output late: the divided VCO clock lags),
// the other by the rising edge of the divided VCO clock (output early). As
// soon as both are set they reset each other. The average of late - early
// is proportional to the phase error while the frequencies match; when they
// do not, one flip-flop is set more often than the other and the output
// stays consistently late (VCO slow) or early (VCO fast), so the PLL needs
// no start-up help. This structure is the document's. The mutual reset here
// is immediate; in silicon the reset path delay gives both outputs a short
// common pulse, which the charge pump cancels.
//
// Interface: all inputs asynchronous; rst (active high) clears both flops.
module pfd (
  input  logic ref_clk,
  input  logic div_clk,
  input  logic rst,
  output logic late,
  output logic early
);

  logic both;

  assign both = late & early;

  always_ff @(posedge ref_clk or posedge both or posedge rst) begin
    if (rst || both) late <= 1'b0;
    else             late <= 1'b1;
  end

  always_ff @(posedge div_clk or posedge both or posedge rst) begin
    if (rst || both) early <= 1'b0;
    else             early <= 1'b1;
  end

endmodule
