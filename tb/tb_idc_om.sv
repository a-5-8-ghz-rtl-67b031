// tb_idc_om: exhaustive check of the output multiplexer and the OR with WO_INT.
module tb_idc_om;
  timeunit 1ns;
  timeprecision 1ps;
  logic ir, ext, m, wo, wu, wk;
  int checks = 0, failures = 0;
  idc_om dut (.int_r_i(ir), .wu_ext_i(ext), .m_ctrl_i(m), .wo_int_i(wo),
              .wu_int_o(wu), .wk_int_o(wk));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      logic exp_wu;
      {wo, m, ext, ir} = 4'(i);
      #1;
      exp_wu = m ? ext : ir;
      checks += 2;
      if (wu !== exp_wu)        begin failures++; $display("FAIL wu i=%0d", i); end
      if (wk !== (exp_wu | wo)) begin failures++; $display("FAIL wk i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
