// tb_idc_wog: WO_INT must be high for T_WOI cycles and low for T_WOS cycles,
// starting high, with a wo_dn pulse at the end of every full period; wo_clr
// restarts it and dropping wo_en forces WO_INT low.
module tb_idc_wog;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1, en = 0, clr = 1, wo, dn;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [15:0] twoi, twos;
  int checks = 0, failures = 0;
  idc_wog dut (.clk, .rst_n, .wo_en_i(en), .wo_clr_i(clr), .twoi_i(twoi), .twos_i(twos),
               .wo_int_o(wo), .wo_dn_o(dn));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int hi, lo, c;
      hi = $urandom_range(1, 40); lo = $urandom_range(1, 60);
      @(negedge clk); twoi = 16'(hi); twos = 16'(lo); clr = 1; en = 0;
      @(negedge clk); clr = 0; en = 1;
      // cycle c (1-based) is the state after clock edge c
      for (c = 1; c <= 3 * (hi + lo); c++) begin
        int ph; logic exp_wo, exp_dn;
        @(posedge clk); #1;
        ph = (c - 1) % (hi + lo);
        exp_wo = (ph < hi);
        exp_dn = (c > 1) && (ph == 0);
        checks += 2;
        if (wo !== exp_wo) begin failures++; $display("FAIL wo t=%0d c=%0d", t, c); end
        if (dn !== exp_dn) begin failures++; $display("FAIL dn t=%0d c=%0d", t, c); end
      end
      @(negedge clk); en = 0;
      @(posedge clk); #1; checks++;
      if (wo !== 0) begin failures++; $display("FAIL wo not low when disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
