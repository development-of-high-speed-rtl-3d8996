`timescale 1ps/1fs
// pll_model: BEHAVIOURAL MODEL (not synthesizable) of the clock-multiplying
// PLL that turns the 40 MHz reference clock into the 1.28 GHz time-base clock.
//
// The real PLL is an analog circuit: a ring-oscillator VCO of differential
// buffers, a divide-by-32 feedback divider, a phase-frequency detector and a
// charge pump driving an RC loop filter (a capacitor in series with a
// resistor, which gives the loop its stabilising zero). The divider and the
// phase-frequency detector are digital and are the synthesizable modules
// clock_divider and pfd. The charge pump, the filter and the VCO are modelled
// here with real numbers: the pump current charges the capacitor while late
// or early is high (integral path) and, through the resistor, adds a
// proportional step to the control voltage; the VCO frequency is
// F0 + KVCO * (vctrl - V0), limited to [FMIN, FMAX]. The VCO only computes
// its next edge at each edge, so the short proportional step (a pump pulse
// lasts only as long as the phase error) is not applied as a voltage but as
// the phase it is worth, KVCO * ICP*R * pulse length, taken off the next
// half period; the integral path acts through vc. The VCO gain of
// 5.71 GHz/V is the document's typical-corner value and the filter capacitor
// is discharged at reset, as in the document. The pump current, capacitor
// and resistor values are this design's, chosen for a 2 MHz natural
// frequency and a damping factor of 1; the model locks in about 2 us.
//
// Interface: ref_clk is the reference, rst_n an asynchronous active-low
// reset; clk_vco is the 1.28 GHz output (32 x ref), clk_div the divided
// clock fed back to the detector (and brought out as a test signal).
module pll_model #(
  parameter int unsigned DIV        = 32,
  parameter real         F0_GHZ     = 1.28,    // VCO frequency at V0
  parameter real         V0         = 0.6,
  parameter real         KVCO_GHZ_V = 5.71,
  parameter real         FMIN_GHZ   = 0.2,
  parameter real         FMAX_GHZ   = 3.0,
  parameter real         ICP_C_V_PS = 8.85e-7, // pump current / capacitor, V per ps
  parameter real         ICP_R_V    = 0.141    // pump current x resistor, V
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic clk_vco,
  output logic clk_div
);

  logic    late, early;
  real     vc, vctrl, sgn, kick;
  realtime t_last;

  pfd u_pfd (.ref_clk, .div_clk(clk_div), .rst(!rst_n), .late, .early);

  clock_divider #(.DIV(DIV)) u_div (.clk_in(clk_vco), .rst_n, .clk_out(clk_div));

  // Charge pump and RC filter.
  initial begin
    vc     = 0.0;
    vctrl  = 0.0;
    sgn    = 0.0;
    kick   = 0.0;
    t_last = 0;
  end

  always @(late or early or rst_n) begin
    if (!rst_n) begin
      vc   = 0.0;
      kick = 0.0;
    end else begin
      vc   = vc + ICP_C_V_PS * ($realtime - t_last) * sgn;
      // proportional path: phase in VCO cycles
      kick = kick + KVCO_GHZ_V * 1.0e-3 * ICP_R_V * ($realtime - t_last) * sgn;
    end
    t_last = $realtime;
    sgn    = (late && !early) ? 1.0 : ((early && !late) ? -1.0 : 0.0);
    vctrl  = vc;
  end

  // Voltage-controlled ring oscillator.
  function automatic real half_period_ps(real v);
    real f;
    f = F0_GHZ + KVCO_GHZ_V * (v - V0);
    if (f < FMIN_GHZ) f = FMIN_GHZ;
    if (f > FMAX_GHZ) f = FMAX_GHZ;
    return 500.0 / f;
  endfunction

  initial begin
    clk_vco = 1'b0;
    forever begin
      real h;
      h = half_period_ps(vctrl);
      // the proportional kick, as time at the present frequency
      h = h - kick * 2.0 * h;
      kick = 0.0;
      if (h < 50.0) h = 50.0;
      #(h) clk_vco = !clk_vco;
    end
  end

endmodule
