`timescale 1ps/1fs
// hit_register_bank: the per-channel bank of hit registers.
//
// One D flip-flop per time-base bit. The data inputs see the time base (the
// 32 DLL tap outputs and, in the target chip, the Gray coarse count); the
// clock is the channel's store pulse (the hit controller output, or in the
// prototype the hit input itself). On the rising edge of that clock the bank
// stores the state of the time base, the raw timestamp. The document's bank
// is full custom (tristate-inverter master-slave flip-flops, 32 per channel);
// here it is plain flip-flops of the same function.
//
// Interface: d is the time base, q the stored timestamp, valid only once the
// clock edge has happened; the readers (transfer logic or readout shift
// register) must wait for that. rst_n clears q, so that the bank holds a
// known value before the first hit.
module hit_register_bank #(
  parameter int unsigned W = tdc_pkg::TAPS
) (
  input  logic         hit_clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge hit_clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
