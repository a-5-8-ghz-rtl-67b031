// idc_fsmc: finite state machine controller (FSMC), the core of the IDC.
//
// The FSMC decides when the OBU transceiver may be woken. States:
//   S_OFF    EN low. Nothing is monitored, all units are held cleared.
//   S_LISTEN initial state. Waits for a rising edge of the wake-up signal.
//            With self-hibernation (mode_ctrl = 1) the oscillator is slowed
//            to the hibernation code meanwhile.
//   S_MEAS   first edge seen: the oscillator runs at the wake-up code, the
//            AFMU measures periods (fm_en) and the watchdog runs (wdt_en).
//            fm_det (WU_N valid cycles) leads to S_INT; a watchdog time-out
//            (wdt_dn) or SILENT returns to S_LISTEN.
//   S_INT    int_r is held high for T_HOLD cycles (HOLD), then the FSMC goes
//            back to S_LISTEN if monitor_ctrl = 1, else to S_DONE.
//   S_DONE   DONE is high; the FSMC stays here until EN is dropped.
//   S_WO     wake-on mode (WUO = 1): the WOG sends periodic interrupts. When
//            WUO falls, the FSMC leaves on the next wo_dn (end of a period).
// SILENT keeps the FSMC in S_LISTEN, so no wake-up is detected while it is
// high. WU_N is latched on entering S_MEAS and passed to the AFMU; int_ctrl is
// registered and passed to the output multiplexer as m_ctrl.
//
// The signal names and the roles of the blocks the FSMC controls follow the
// source. The set of states, the exact meaning of the inputs WUO, SILENT, HOLD
// and EN and of the output DONE, and the capacitor codes per mode are this
// design's reading. The codes assume the oscillator frequency falls as
// 1/(1 + k*code) between 362.37 kHz (code 0) and 12.16 kHz (code 255):
// code 14 gives about 140 kHz (wake-up), code 220 about 14 kHz (hibernation).
// All outputs are registered or decoded from the state register; a transition
// takes effect at the next clock edge.
module idc_fsmc
  import idc_pkg::*;
#(
  parameter logic [OSC_W-1:0] OSC_CODE_WU = 8'd14,   // ~140 kHz
  parameter logic [OSC_W-1:0] OSC_CODE_SH = 8'd220,  // ~14 kHz
  parameter logic [OSC_W-1:0] OSC_CODE_WO = 8'd220   // ~14 kHz
) (
  input  logic             clk,
  input  logic             rst_n,
  // external controls
  input  logic             en_i,
  input  logic             wuo_i,
  input  logic             silent_i,
  input  logic [TMR_W-1:0] hold_i,
  input  logic [WUN_W-1:0] wu_n_cfg_i,
  // from the control decoder
  input  logic             int_ctrl_i,
  input  logic             mode_ctrl_i,
  input  logic             monitor_ctrl_i,
  // from the datapath units
  input  logic             wu_pe_i,
  input  logic             fm_det_i,
  input  logic             wdt_dn_i,
  input  logic             wo_dn_i,
  // to the datapath units
  output logic             fm_en_o,
  output logic [WUN_W-1:0] wu_n_o,
  output logic             wdt_en_o,
  output logic             wdt_clr_o,
  output logic             wo_en_o,
  output logic             wo_clr_o,
  output logic             int_r_o,
  output logic             m_ctrl_o,
  output logic             done_o,
  output logic [OSC_W-1:0] osc_ctrl_o,
  output fsmc_state_t      state_o
);
  timeunit 1ns;
  timeprecision 1ps;

  fsmc_state_t      state_q, state_d;
  logic [TMR_W-1:0] hold_q;

  always_comb begin
    state_d = state_q;
    if (!en_i) begin
      state_d = S_OFF;
    end else begin
      unique case (state_q)
        S_OFF:    state_d = wuo_i ? S_WO : S_LISTEN;
        S_LISTEN: if (wuo_i)                     state_d = S_WO;
                  else if (wu_pe_i && !silent_i) state_d = S_MEAS;
        S_MEAS:   if (silent_i || wdt_dn_i)      state_d = S_LISTEN;
                  else if (fm_det_i)             state_d = S_INT;
        S_INT:    if (hold_q + TMR_W'(1) >= hold_i)
                    state_d = monitor_ctrl_i ? S_LISTEN : S_DONE;
        S_DONE:   state_d = S_DONE;
        S_WO:     if (!wuo_i && wo_dn_i)         state_d = S_LISTEN;
        default:  state_d = S_OFF;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_OFF;
      hold_q   <= '0;
      wu_n_o   <= '0;
      m_ctrl_o <= 1'b0;
    end else begin
      state_q  <= state_d;
      m_ctrl_o <= int_ctrl_i;
      hold_q   <= (state_q == S_INT && state_d == S_INT) ? hold_q + TMR_W'(1) : '0;
      if (state_q != S_MEAS && state_d == S_MEAS) wu_n_o <= wu_n_cfg_i;
    end
  end

  always_comb begin
    fm_en_o   = (state_q == S_MEAS);
    wdt_en_o  = (state_q == S_MEAS);
    wdt_clr_o = (state_q != S_MEAS);
    wo_en_o   = (state_q == S_WO);
    wo_clr_o  = (state_q != S_WO);
    int_r_o   = (state_q == S_INT);
    done_o    = (state_q == S_DONE);
    state_o   = state_q;
    unique case (state_q)
      S_LISTEN:     osc_ctrl_o = mode_ctrl_i ? OSC_CODE_SH : OSC_CODE_WU;
      S_MEAS, S_INT: osc_ctrl_o = OSC_CODE_WU;
      S_WO:         osc_ctrl_o = OSC_CODE_WO;
      default:      osc_ctrl_o = OSC_CODE_SH;
    endcase
  end

  // The interrupt and the wake-on generator are never active together.
  a_int_excl: assert property (@(posedge clk) disable iff (!rst_n) !(int_r_o && wo_en_o));
endmodule
