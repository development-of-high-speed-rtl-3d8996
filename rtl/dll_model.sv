`timescale 1ps/1fs
// dll_model: BEHAVIOURAL MODEL (not synthesizable) of the 32-element
// delay-locked loop that provides the 32 phase-shifted clocks of the time
// base.
//
// The real DLL is full custom: a voltage-controlled delay line (VCDL) of 32
// differential delay elements (a differential pair with a control-voltage
// tail current source, three switchable calibration tail sources of 25 %,
// 12.5 % and 6.25 %, a constant tail source and active-inductor loads), a
// balanced D flip-flop as bang-bang phase detector, and a charge pump with a
// filter capacitor. This model keeps the ports and the loop behaviour:
//   - The phase detector samples the VCDL input with the rising edge of the
//     VCDL output: late = 1 when the input is still high, i.e. the line is
//     too slow; early is its complement.
//   - Once per VCDL output cycle the charge pump moves the control voltage
//     by DV_V x 2^icp_sel up (cp_up) or down (cp_dn). precharge holds it at
//     the supply, the reset value the document uses so the line starts at
//     its smallest delay and cannot lock to two clock periods.
//   - Each element's delay is D_NOM_PS + KVCDL_PS_V * (vctrl - V0), limited
//     to [DMIN_PS, DMAX_PS]: the delay falls as the voltage rises. Enabled
//     calibration sources (cal[3k+2:3k] for element k, weights 1/4, 1/8,
//     1/16) raise the element's current and shorten its delay in
//     proportion.
// The gain of -87.9 ps/V is the document's typical-corner VCDL gain, read
// as the gain of one element; the nominal 24.4 ps (1.28 GHz / 32) is the
// document's. V0, the delay limits and the step size are this design's.
//
// Interface: clk_in is the 1.28 GHz clock; taps[k] is clk_in after k
// elements (taps[0] = clk_in); clk_out follows the last element.
module dll_model #(
  parameter int unsigned N          = 32,
  parameter real         D_NOM_PS   = 24.4140625,
  parameter real         KVCDL_PS_V = -87.9,
  parameter real         V0         = 0.6,
  parameter real         VDD        = 1.2,
  parameter real         DMIN_PS    = 15.0,
  parameter real         DMAX_PS    = 40.0,
  parameter real         DV_V       = 0.002
) (
  input  logic           clk_in,
  input  logic           precharge,
  input  logic           cp_up,
  input  logic           cp_dn,
  input  logic [1:0]     icp_sel,
  input  logic [3*N-1:0] cal,
  output logic [N-1:0]   taps,
  output logic           clk_out,
  output logic           late,
  output logic           early
);

  logic [N:0] stage;
  real        vctrl;

  function automatic real elem_delay(real v, logic [2:0] c);
    real d;
    d = D_NOM_PS + KVCDL_PS_V * (v - V0);
    if (d < DMIN_PS) d = DMIN_PS;
    if (d > DMAX_PS) d = DMAX_PS;
    return d / (1.0 + 0.25 * real'(c[2]) + 0.125 * real'(c[1]) + 0.0625 * real'(c[0]));
  endfunction

  initial begin
    vctrl = VDD;
    late  = 1'b0;
  end

  assign stage[0] = clk_in;

  for (genvar k = 0; k < N; k++) begin : g_elem
    initial stage[k+1] = 1'b0;
    always @(stage[k]) stage[k+1] <= #(elem_delay(vctrl, cal[3*k +: 3])) stage[k];
  end

  assign taps    = stage[N-1:0];
  assign clk_out = stage[N];
  assign early   = !late;

  // Bang-bang phase detector and charge pump.
  always @(posedge clk_out or posedge precharge) begin
    if (precharge) begin
      vctrl = VDD;
    end else begin
      if (cp_up && !cp_dn) vctrl = vctrl + DV_V * real'(1 << icp_sel);
      if (cp_dn && !cp_up) vctrl = vctrl - DV_V * real'(1 << icp_sel);
      if (vctrl > VDD) vctrl = VDD;
      if (vctrl < 0.0) vctrl = 0.0;
    end
    late <= clk_in;
  end

endmodule
