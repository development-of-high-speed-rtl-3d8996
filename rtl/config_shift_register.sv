`timescale 1ps/1fs
// config_shift_register: two-stage configuration register of the prototype.
//
// Stage 1 is a serial-in, parallel-out shift register clocked by shift_clk:
// a new configuration is shifted in while the chip keeps running on the old
// one. Stage 2 drives the chip. On an edge of its own clock upd_clk it
// either takes stage 1 in parallel (upd_shift low), which activates the new
// configuration at once, or, for verification, shifts itself out serially
// on sout (upd_shift high), which destroys its content until the next
// update or reset. Reset loads DEFAULT into both stages, so the chip works
// without any configuration being shifted in. All of this is the document's;
// the shift direction (the first bit shifted in ends in bit 0), the zeros
// shifted into stage 2 during verification and the contents of DEFAULT are
// this design's.
//
// Interface: shift_clk and upd_clk are independent clocks; rst_n is
// asynchronous. cfg is stage 2.
module config_shift_register #(
  parameter int unsigned W       = tdc_pkg::PROTO_CFG_W,
  parameter logic [W-1:0] DEFAULT = '0
) (
  input  logic         shift_clk,
  input  logic         upd_clk,
  input  logic         rst_n,
  input  logic         sin,
  input  logic         upd_shift,
  output logic [W-1:0] cfg,
  output logic         sout
);

  logic [W-1:0] s1_q;

  always_ff @(posedge shift_clk or negedge rst_n) begin
    if (!rst_n) s1_q <= DEFAULT;
    else        s1_q <= {sin, s1_q[W-1:1]};
  end

  always_ff @(posedge upd_clk or negedge rst_n) begin
    if (!rst_n)         cfg <= DEFAULT;
    else if (upd_shift) cfg <= {1'b0, cfg[W-1:1]};
    else                cfg <= s1_q;
  end

  assign sout = cfg[0];

endmodule
