// idc: intelligent digital controller of the 5.8 GHz DSRC wake-up receiver.
//
// The controller filters the comparator output of the wake-up receiver and
// raises the interrupt WK_INT only for a genuine DSRC wake-up tone: a signal
// whose frequency lies inside a configured window (NXFN..NNFX cycles per
// period) for WU_N consecutive periods. Everything else (noise, a tone of the
// wrong frequency, too short a burst) is rejected, and a watchdog returns the
// controller to its initial state if a measurement does not finish.
//
// Data flow, as in the source's block diagram: SSM (WU_SIG or the self-test
// pattern from the STPG) -> SPEG (rising edge pulses) -> AFMU (period window,
// consecutive count) -> FSMC. The FSMC also drives the watchdog CWDT, the
// wake-on generator WOG and the oscillator code OSC_CTRL, and the OM selects
// the internal or the external interrupt and ORs in the wake-on interrupt.
// The CDEC decodes the CTRL word (encoding in idc_pkg).
//
// Interface: one clock from the RC oscillator, asynchronous active-low reset,
// asynchronous inputs WU_SIG and CTRL (synchronized inside), configuration
// struct cfg and level inputs EN, WUO, SILENT assumed static or synchronous.
// Latency: WK_INT rises at the fifth clock edge counted from the edge that
// first samples the rising edge completing the WU_N-th valid period (two
// synchronizer stages and the edge detector in the SPEG, then the AFMU and the
// FSMC registers). The first rising edge of a tone only wakes the FSMC; the
// second starts the first measured period, so a tone needs WU_N + 2 rising
// edges before WK_INT.
module idc
  import idc_pkg::*;
#(
  parameter logic [OSC_W-1:0] OSC_CODE_WU = 8'd14,
  parameter logic [OSC_W-1:0] OSC_CODE_SH = 8'd220,
  parameter logic [OSC_W-1:0] OSC_CODE_WO = 8'd220
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wu_sig_i,   // WU_SIG, comparator output
  input  logic              wu_ext_i,   // WU_EXT, manual interrupt
  input  logic [CTRL_W-1:0] ctrl_i,     // CTRL
  input  logic              en_i,       // EN
  input  logic              wuo_i,      // WUO, wake-on mode
  input  logic              silent_i,   // SILENT
  input  idc_cfg_t          cfg_i,
  output logic              wk_int_o,   // WK_INT
  output logic              done_o,     // DONE
  output logic [OSC_W-1:0]  osc_ctrl_o  // OSC_CTRL
);
  timeunit 1ns;
  timeprecision 1ps;

  logic st_en, int_ctrl, mode_ctrl, monitor_ctrl;
  logic st_sig, sel_sig, wu_pe;
  logic fm_en, fm_det;
  logic [WUN_W-1:0] wu_n;
  logic wdt_en, wdt_clr, wdt_dn;
  logic wo_en, wo_clr, wo_dn, wo_int;
  logic int_r, m_ctrl;

  idc_cdec u_cdec (
    .clk, .rst_n, .ctrl_i,
    .st_en_o(st_en), .int_ctrl_o(int_ctrl), .mode_ctrl_o(mode_ctrl),
    .monitor_ctrl_o(monitor_ctrl));

  idc_stpg u_stpg (
    .clk, .rst_n, .st_en_i(st_en), .stm_i(cfg_i.stm), .stn_i(cfg_i.stn),
    .st_sig_o(st_sig));

  idc_ssm u_ssm (
    .wu_sig_i, .st_sig_i(st_sig), .st_en_i(st_en), .sel_sig_o(sel_sig));

  idc_speg u_speg (
    .clk, .rst_n, .sig_i(sel_sig), .wu_pe_o(wu_pe));

  idc_afmu u_afmu (
    .clk, .rst_n, .fm_en_i(fm_en), .wu_pe_i(wu_pe),
    .nxfn_i(cfg_i.nxfn), .nnfx_i(cfg_i.nnfx), .wu_n_i(wu_n),
    .fm_det_o(fm_det));

  idc_cwdt u_cwdt (
    .clk, .rst_n, .wdt_en_i(wdt_en), .wdt_clr_i(wdt_clr),
    .wdtn_i(cfg_i.wdtn), .wdt_dn_o(wdt_dn));

  idc_wog u_wog (
    .clk, .rst_n, .wo_en_i(wo_en), .wo_clr_i(wo_clr),
    .twoi_i(cfg_i.twoi), .twos_i(cfg_i.twos),
    .wo_int_o(wo_int), .wo_dn_o(wo_dn));

  idc_fsmc #(
    .OSC_CODE_WU(OSC_CODE_WU), .OSC_CODE_SH(OSC_CODE_SH),
    .OSC_CODE_WO(OSC_CODE_WO)
  ) u_fsmc (
    .clk, .rst_n, .en_i, .wuo_i, .silent_i,
    .hold_i(cfg_i.hold), .wu_n_cfg_i(cfg_i.wu_n),
    .int_ctrl_i(int_ctrl), .mode_ctrl_i(mode_ctrl),
    .monitor_ctrl_i(monitor_ctrl),
    .wu_pe_i(wu_pe), .fm_det_i(fm_det), .wdt_dn_i(wdt_dn), .wo_dn_i(wo_dn),
    .fm_en_o(fm_en), .wu_n_o(wu_n), .wdt_en_o(wdt_en), .wdt_clr_o(wdt_clr),
    .wo_en_o(wo_en), .wo_clr_o(wo_clr), .int_r_o(int_r), .m_ctrl_o(m_ctrl),
    .done_o, .osc_ctrl_o, .state_o());

  idc_om u_om (
    .int_r_i(int_r), .wu_ext_i, .m_ctrl_i(m_ctrl), .wo_int_i(wo_int),
    .wu_int_o(), .wk_int_o);
endmodule
