`timescale 1ps/1fs
// readout_shift_register: serial readout of all hit registers of the
// prototype.
//
// A W-bit register (44 channels x 32 bits = 1408 in the prototype) with a
// parallel input from the hit registers and a serial output. With load high
// a readout clock edge copies all hit registers at once; with load low each
// edge shifts the register by one bit towards sout and takes sin (the
// configuration data input) in at the other end. Reading thus overwrites the
// register, but the hit registers keep their data, so the same hits can be
// loaded and read again; shifting in known data from sin tests the register
// on its own. This is the document's description. The shift direction (bit 0
// first, i.e. channel 0 tap 0 first) is this design's, as is the choice of
// non-inverting slices.
//
// Interface: clk is the readout clock, rst_n asynchronous. sout = q[0].
module readout_shift_register #(
  parameter int unsigned W = 44 * 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] pin,
  input  logic         sin,
  output logic         sout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= pin;
    else           q <= {sin, q[W-1:1]};
  end

  assign sout = q[0];

endmodule
