// tb_idc_cwdt: the watchdog must raise wdt_dn exactly WDTN enabled cycles
// after it is started, hold it until cleared, pause while disabled, and never
// fire when WDTN = 0.
module tb_idc_cwdt;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1, en = 0, clr = 1, dn;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [15:0] wdtn = 0;
  int checks = 0, failures = 0;
  idc_cwdt dut (.clk, .rst_n, .wdt_en_i(en), .wdt_clr_i(clr), .wdtn_i(wdtn), .wdt_dn_o(dn));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic exp, input string what);
    checks++;
    if (dn !== exp) begin failures++; $display("FAIL %s dn=%b", what, dn); end
  endtask
  initial begin
    int pause;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int n;
      n = (t == 0) ? 1 : $urandom_range(2, 300);
      @(negedge clk); wdtn = 16'(n); clr = 1;
      @(negedge clk); clr = 0; en = 1;
      pause = (t == 3) ? 7 : 0;
      for (int c = 1; c <= n + pause; c++) begin
        if (t == 3 && c == 3) begin en = 0; repeat (pause) @(negedge clk); en = 1; end
        @(posedge clk); #1;
        if (c < n) check(0, "early");
        else if (c == n) check(1, "at WDTN");
        @(negedge clk);
      end
      repeat (5) @(posedge clk); #1; check(1, "sticky");
    end
    @(negedge clk); clr = 1; wdtn = 0;
    @(negedge clk); clr = 0; en = 1;
    repeat (500) @(posedge clk); #1; check(0, "disabled by WDTN=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
