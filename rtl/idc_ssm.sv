// idc_ssm: signal selection multiplexer (SSM) of the IDC.
//
// Selects the signal the controller analyses: the comparator output WU_SIG in
// normal operation, or the self-test pattern st_sig while self-test is enabled
// (st_en = 1). Purely combinational; both inputs are single-bit. The selection
// rule follows the source; using st_en as the select line is this design's
// reading of the block diagram, where st_en enters the multiplexer.
module idc_ssm (
  input  logic wu_sig_i,   // comparator output WU_SIG
  input  logic st_sig_i,   // self-test pattern
  input  logic st_en_i,    // self-test enable
  output logic sel_sig_o   // selected signal, to the edge generator
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb sel_sig_o = st_en_i ? st_sig_i : wu_sig_i;
endmodule
