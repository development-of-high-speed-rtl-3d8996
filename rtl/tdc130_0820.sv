`timescale 1ps/1fs
// tdc130_0820: the TDC130-0820 prototype, the chip built to measure the
// timing performance of the TDC130 time base.
//
// A PLL multiplies the 40 MHz reference clock by 32 to 1.28 GHz; a 32-element
// DLL locked to one period of that clock gives 32 phase-shifted clocks, 24.4
// ps apart; each of N_CHAN channels has a bank of 32 hit registers that stores
// the state of the 32 DLL taps when its hit input rises (that pattern is the
// timestamp: the position of the clock edge in the line). Channels share
// their hit input in N_GROUPS groups to save pins. Data leave through the
// readout shift register (all hit registers loaded in parallel, shifted out
// serially) and the chip is set up through the two-stage configuration
// shift register, whose reset value is a working configuration. A DLL
// start-up state machine makes the DLL lock to one clock period.
//
// From the document: the blocks and their connection, 44 channels in 8
// groups, the 1408-bit readout register, the test output that shows the PLL
// input or the divider output. This design's: channel c is wired to hit
// group c mod 8, the layout of the configuration word (tdc_pkg::proto_cfg_t)
// and the other test output choices. The PLL and the DLL are behavioural
// models (pll_model, dll_model); the rest is synthesizable.
//
// Interface: ref_clk 40 MHz; hit_grp asynchronous; ro_clk/ro_load readout;
// cfg_* configuration (cfg_din also feeds the readout register's serial
// input, as on the chip); rst_n asynchronous, active low.
module tdc130_0820
  import tdc_pkg::*;
#(
  parameter int unsigned N_CHAN   = 44,
  parameter int unsigned N_GROUPS = 8
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic [N_GROUPS-1:0] hit_grp,
  input  logic                ro_clk,
  input  logic                ro_load,
  output logic                ro_dout,
  input  logic                cfg_clk,
  input  logic                cfg_din,
  input  logic                cfg_upd_clk,
  input  logic                cfg_upd_shift,
  output logic                cfg_dout,
  output logic                test_out,
  output logic                dll_tracking
);

  logic               clk1280, clk_div, dll_out, late, early;
  logic               precharge, cp_up, cp_dn;
  logic [TAPS-1:0]    taps;
  logic [TAPS*N_CHAN-1:0] hitregs;
  proto_cfg_t         cfg;

  pll_model u_pll (.ref_clk, .rst_n, .clk_vco(clk1280), .clk_div);

  dll_model #(.N(TAPS)) u_dll (
    .clk_in(clk1280), .precharge, .cp_up, .cp_dn,
    .icp_sel(cfg.icp_sel), .cal(cfg.cal),
    .taps, .clk_out(dll_out), .late, .early
  );

  dll_startup_fsm u_start (
    .clk(dll_out), .rst_n, .late,
    .force_en(cfg.force_en), .force_dn(cfg.force_dn),
    .precharge, .cp_up, .cp_dn, .tracking(dll_tracking)
  );

  for (genvar c = 0; c < N_CHAN; c++) begin : g_ch
    hit_register_bank #(.W(TAPS)) u_hr (
      .hit_clk(hit_grp[c % N_GROUPS]), .rst_n, .d(taps),
      .q(hitregs[c*TAPS +: TAPS])
    );
  end

  readout_shift_register #(.W(TAPS * N_CHAN)) u_ro (
    .clk(ro_clk), .rst_n, .load(ro_load), .pin(hitregs), .sin(cfg_din),
    .sout(ro_dout)
  );

  config_shift_register #(.W(PROTO_CFG_W)) u_cfg (
    .shift_clk(cfg_clk), .upd_clk(cfg_upd_clk), .rst_n, .sin(cfg_din),
    .upd_shift(cfg_upd_shift), .cfg(cfg), .sout(cfg_dout)
  );

  always_comb begin
    unique case (cfg.test_sel)
      2'd0:    test_out = ref_clk;
      2'd1:    test_out = clk_div;
      2'd2:    test_out = late;
      default: test_out = dll_tracking;
    endcase
  end

endmodule
