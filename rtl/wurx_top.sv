// wurx_top: digital core of the 5.8 GHz DSRC wake-up receiver.
//
// The analog front end (matching networks, RF envelope detector, baseband
// amplifier and comparator) turns the 5.8 GHz OOK wake-up burst into the
// digital signal WU_SIG; that signal enters here. The RC oscillator model
// rc_osc supplies the controller clock, and the intelligent digital controller
// idc sets the oscillator's capacitor code OSC_CTRL itself: slow (about 14 kHz)
// while it hibernates, about 140 kHz while it measures a wake-up tone. The
// controller raises WK_INT for the OBU's MCU and transceiver.
//
// Ports other than the oscillator enable are the controller's; the MCU that
// drives CTRL, EN, WUO, SILENT and the configuration sits outside. Because the
// oscillator is a behavioural model with delays, this top is for simulation;
// idc alone is the synthesizable design.
module wurx_top
  import idc_pkg::*;
#(
  parameter real F_MAX_HZ = 362370.0,
  parameter real F_MIN_HZ = 12160.0
) (
  input  logic              rst_n,
  input  logic              osc_enb,   // oscillator enable, active low
  input  logic              wu_sig,    // comparator output
  input  logic              wu_ext,    // external manual interrupt
  input  logic [CTRL_W-1:0] ctrl,
  input  logic              en,
  input  logic              wuo,
  input  logic              silent,
  input  idc_cfg_t          cfg,
  output logic              wk_int,
  output logic              done,
  output logic [OSC_W-1:0]  osc_ctrl,
  output logic              clk        // oscillator output, for observation
);
  timeunit 1ns;
  timeprecision 1ps;

  rc_osc #(.F_MAX_HZ(F_MAX_HZ), .F_MIN_HZ(F_MIN_HZ)) u_osc (
    .enb(osc_enb), .osc_ctrl, .clk);

  idc u_idc (
    .clk, .rst_n, .wu_sig_i(wu_sig), .wu_ext_i(wu_ext), .ctrl_i(ctrl),
    .en_i(en), .wuo_i(wuo), .silent_i(silent), .cfg_i(cfg),
    .wk_int_o(wk_int), .done_o(done), .osc_ctrl_o(osc_ctrl));
endmodule
