// idc_om: output multiplexer (OM) and interrupt combiner of the IDC.
//
// The multiplexer selects the wake-up interrupt: the controller's own int_r, or
// the external manual interrupt WU_EXT when m_ctrl = 1. The selected wake-up
// interrupt is ORed with the wake-on interrupt WO_INT to give WK_INT, the
// single interrupt line to the transceiver. Both the multiplexer and the OR
// gate are drawn in the source's block diagram. Purely combinational.
module idc_om (
  input  logic int_r_i,    // internal wake-up interrupt from the FSMC
  input  logic wu_ext_i,   // external manual interrupt WU_EXT
  input  logic m_ctrl_i,   // 1: select WU_EXT
  input  logic wo_int_i,   // wake-on interrupt from the WOG
  output logic wu_int_o,   // selected wake-up interrupt WU_INT
  output logic wk_int_o    // WK_INT = WU_INT | WO_INT
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    wu_int_o = m_ctrl_i ? wu_ext_i : int_r_i;
    wk_int_o = wu_int_o | wo_int_i;
  end
endmodule
