// idc_pkg: types and constants shared by the blocks of the intelligent
// digital controller (IDC) of the 5.8 GHz DSRC wake-up receiver.
//
// The controller is configured by an external MCU. The fields of idc_cfg_t are
// the configuration values named in the controller's block diagram (WU_N,
// NXFN, NNFX, WDTN, HOLD, STM, STN) plus the two wake-on intervals T_WOI and
// T_WOS of its timing diagram. Their widths are this design's choice: the
// source gives none. Times are counted in cycles of the controller clock,
// which comes from the RC oscillator (about 140 kHz while a wake-up signal is
// measured).
//
// The CTRL word decoded by the control decoder (CDEC) is also this design's
// own encoding: bit 0 self-test enable, bit 1 manual interrupt select, bit 2
// self-hibernation mode, bit 3 continuous monitoring.
package idc_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PER_W  = 8;   // period counter, NXFN, NNFX
  localparam int unsigned WUN_W  = 4;   // WU_N, consecutive valid cycles
  localparam int unsigned TMR_W  = 16;  // WDTN, HOLD, T_WOI, T_WOS
  localparam int unsigned ST_W   = 8;   // STM, STN
  localparam int unsigned CTRL_W = 4;
  localparam int unsigned OSC_W  = 8;   // OSC_CTRL, 8-bit capacitor bank

  typedef struct packed {
    logic [WUN_W-1:0] wu_n;   // valid consecutive cycles before a wake-up
    logic [PER_W-1:0] nxfn;   // shortest accepted period (highest frequency)
    logic [PER_W-1:0] nnfx;   // longest accepted period (lowest frequency)
    logic [TMR_W-1:0] wdtn;   // watchdog time-out, 0 disables the watchdog
    logic [TMR_W-1:0] hold;   // T_HOLD, cycles the wake-up interrupt is held
    logic [TMR_W-1:0] twoi;   // T_WOI, wake-on interrupt high interval
    logic [TMR_W-1:0] twos;   // T_WOS, wake-on interrupt low interval
    logic [ST_W-1:0]  stm;    // self-test half period in cycles
    logic [ST_W-1:0]  stn;    // self-test number of periods
  } idc_cfg_t;

  // Decoded CTRL word.
  typedef struct packed {
    logic monitor_ctrl;  // 1: go back to monitoring after each wake-up
    logic mode_ctrl;     // 1: self-hibernation between wake-up signals
    logic int_ctrl;      // 1: WK_INT follows the external WU_EXT input
    logic st_en;         // 1: self-test, STPG pattern replaces WU_SIG
  } idc_ctrl_t;

  typedef enum logic [2:0] {
    S_OFF    = 3'd0,  // EN low: nothing monitored
    S_LISTEN = 3'd1,  // initial state: waiting for a rising edge
    S_MEAS   = 3'd2,  // measuring frequency and counting valid cycles
    S_INT    = 3'd3,  // wake-up interrupt held for T_HOLD
    S_DONE   = 3'd4,  // wake-up delivered, monitoring stopped
    S_WO     = 3'd5   // wake-on: periodic interrupts from the WOG
  } fsmc_state_t;

endpackage
