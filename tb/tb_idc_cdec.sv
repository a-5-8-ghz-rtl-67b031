// tb_idc_cdec: random CTRL words; each decoded field must equal its CTRL bit
// two clock edges after the change (bit 0 st_en, 1 int_ctrl, 2 mode_ctrl,
// 3 monitor_ctrl).
module tb_idc_cdec;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [3:0] ctrl = 0;
  logic st_en, int_ctrl, mode_ctrl, monitor_ctrl;
  int checks = 0, failures = 0;
  idc_cdec dut (.clk, .rst_n, .ctrl_i(ctrl), .st_en_o(st_en), .int_ctrl_o(int_ctrl),
                .mode_ctrl_o(mode_ctrl), .monitor_ctrl_o(monitor_ctrl));
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      logic [3:0] old;
      old = {monitor_ctrl, mode_ctrl, int_ctrl, st_en};
      @(negedge clk);
      ctrl = 4'($urandom);
      @(posedge clk); #1;
      checks++;   // one edge later: still the old value
      if ({monitor_ctrl, mode_ctrl, int_ctrl, st_en} !== old) begin failures++; $display("FAIL early n=%0d", n); end
      @(posedge clk); #1;
      checks++;
      if ({monitor_ctrl, mode_ctrl, int_ctrl, st_en} !== ctrl) begin
        failures++; $display("FAIL n=%0d ctrl=%b got=%b", n, ctrl, {monitor_ctrl, mode_ctrl, int_ctrl, st_en});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
