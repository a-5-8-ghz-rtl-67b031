// tb_idc_speg: random input; each rising edge must give exactly one wu_pe
// pulse three clock edges later (two synchronizer stages plus the detector).
// Then pulses much narrower than a clock period, placed between clock edges,
// must each give exactly one wu_pe.
module tb_idc_speg;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1, sig = 0, pe;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  int checks = 0, failures = 0, edges = 0, pulses = 0;
  logic hist [0:4];
  idc_speg dut (.clk, .rst_n, .sig_i(sig), .wu_pe_o(pe));
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) sig = ~sig;
      @(posedge clk);
      // hist[0] = value sampled at this edge, hist[k] = k edges earlier
      for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = sig;
      #1;
      if (n > 5) begin
        checks++;
        if (pe !== (hist[2] & ~hist[3])) begin
          failures++; $display("FAIL n=%0d pe=%b", n, pe);
        end
        if (hist[2] & ~hist[3]) edges++;
        if (pe) pulses++;
      end
    end
    // narrow pulses, 2 ns wide, between clock edges
    @(negedge clk); sig = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      int seen;
      @(posedge clk); #2; sig = 1; #2; sig = 0;
      seen = 0;
      repeat (6) begin @(posedge clk); #1; if (pe) seen++; end
      checks++;
      if (seen != 1) begin failures++; $display("FAIL narrow pulse n=%0d seen=%0d", n, seen); end
    end
    checks++;
    if (edges < 100 || pulses != edges) begin failures++; $display("FAIL edges=%0d pulses=%0d", edges, pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
