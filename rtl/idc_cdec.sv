// idc_cdec: control decoder (CDEC) of the IDC.
//
// The MCU sets the controller's operating mode through the CTRL word. CTRL is
// written asynchronously to the slow controller clock, so it is passed through
// a two-flop synchronizer and then split into the four decoded controls: st_en
// (self-test, to the STPG and the SSM), and int_ctrl, mode_ctrl and
// monitor_ctrl (to the FSMC). A change of CTRL appears at the outputs after the
// second clock edge. The source names the decoded signals; the bit assignment
// (see idc_pkg) and the synchronizer are this design's choices.
module idc_cdec
  import idc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CTRL_W-1:0] ctrl_i,
  output logic              st_en_o,
  output logic              int_ctrl_o,
  output logic              mode_ctrl_o,
  output logic              monitor_ctrl_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CTRL_W-1:0] meta_q;
  idc_ctrl_t         dec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= '0;
      dec_q  <= '0;
    end else begin
      meta_q <= ctrl_i;
      dec_q  <= idc_ctrl_t'(meta_q);
    end
  end

  always_comb begin
    st_en_o        = dec_q.st_en;
    int_ctrl_o     = dec_q.int_ctrl;
    mode_ctrl_o    = dec_q.mode_ctrl;
    monitor_ctrl_o = dec_q.monitor_ctrl;
  end
endmodule
