// tb_idc_ssm: exhaustive check of the signal selection multiplexer.
module tb_idc_ssm;
  timeunit 1ns;
  timeprecision 1ps;
  logic wu, st, en, y;
  int checks = 0, failures = 0;
  idc_ssm dut (.wu_sig_i(wu), .st_sig_i(st), .st_en_i(en), .sel_sig_o(y));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {en, st, wu} = 3'(i);
      #1;
      checks++;
      if (y !== (en ? st : wu)) begin failures++; $display("FAIL i=%0d y=%b", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
