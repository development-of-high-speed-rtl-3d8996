`timescale 1ps/1fs
// tdc130_top: the TDC130 target chip and the TDC130-0820 prototype side by
// side.
//
// The two share their time-base design (PLL, DLL with start-up state
// machine, hit register banks) but are separate chips: the target chip
// (tdc130) adds the coarse counter, level-1 buffers, trigger logic, channel
// merging and readout buffer; the prototype (tdc130_0820) reads its hit
// registers through shift registers. This wrapper only brings out the
// ports of both, prefixed t_ and p_; nothing connects the two, so each
// can be used on its own.
module tdc130_top
  import tdc_pkg::*;
(
  // target chip
  input  logic              t_ref_clk,
  input  logic              t_clk_logic,
  input  logic              t_rst_n,
  input  logic [N_CH-1:0]   t_hit,
  input  logic              t_trigger,
  input  logic [N_CH-1:0]   t_ch_enable,
  input  edge_sel_e         t_edge_sel,
  input  trig_cfg_t         t_cfg,
  input  logic [3*TAPS-1:0] t_dll_cal,
  input  logic [1:0]        t_dll_icp_sel,
  output logic              t_dll_tracking,
  output logic              t_ro_valid,
  input  logic              t_ro_ready,
  output ro_word_t          t_ro_word,
  output logic              t_test_clk_div,
  output logic [N_CH-1:0]   t_mon_discard,
  output logic [N_CH-1:0]   t_mon_corrupt,
  output logic [N_CH-1:0]   t_mon_done,
  output logic [N_CH-1:0]   t_mon_overflow,
  // prototype
  input  logic              p_ref_clk,
  input  logic              p_rst_n,
  input  logic [7:0]        p_hit_grp,
  input  logic              p_ro_clk,
  input  logic              p_ro_load,
  output logic              p_ro_dout,
  input  logic              p_cfg_clk,
  input  logic              p_cfg_din,
  input  logic              p_cfg_upd_clk,
  input  logic              p_cfg_upd_shift,
  output logic              p_cfg_dout,
  output logic              p_test_out,
  output logic              p_dll_tracking
);

  tdc130 u_tdc130 (
    .ref_clk(t_ref_clk), .clk_logic(t_clk_logic), .rst_n(t_rst_n),
    .hit(t_hit), .trigger(t_trigger), .ch_enable(t_ch_enable),
    .edge_sel(t_edge_sel), .cfg(t_cfg), .dll_cal(t_dll_cal),
    .dll_icp_sel(t_dll_icp_sel), .dll_tracking(t_dll_tracking),
    .ro_valid(t_ro_valid), .ro_ready(t_ro_ready), .ro_word(t_ro_word),
    .test_clk_div(t_test_clk_div), .mon_discard(t_mon_discard),
    .mon_corrupt(t_mon_corrupt), .mon_done(t_mon_done),
    .mon_overflow(t_mon_overflow)
  );

  tdc130_0820 u_proto (
    .ref_clk(p_ref_clk), .rst_n(p_rst_n), .hit_grp(p_hit_grp),
    .ro_clk(p_ro_clk), .ro_load(p_ro_load), .ro_dout(p_ro_dout),
    .cfg_clk(p_cfg_clk), .cfg_din(p_cfg_din), .cfg_upd_clk(p_cfg_upd_clk),
    .cfg_upd_shift(p_cfg_upd_shift), .cfg_dout(p_cfg_dout),
    .test_out(p_test_out), .dll_tracking(p_dll_tracking)
  );

endmodule
