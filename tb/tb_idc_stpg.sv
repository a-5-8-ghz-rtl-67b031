// tb_idc_stpg: after st_en rises the pattern must be STN periods, each STM
// cycles high and STM cycles low, then stay low; a new rise of st_en repeats it.
module tb_idc_stpg;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1, en = 0, sig;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [7:0] stm, stn;
  int checks = 0, failures = 0;
  idc_stpg dut (.clk, .rst_n, .st_en_i(en), .stm_i(stm), .stn_i(stn), .st_sig_o(sig));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int m, n, rises; logic prev;
      m = $urandom_range(1, 12); n = (t == 0) ? 0 : $urandom_range(1, 17);
      @(negedge clk); stm = 8'(m); stn = 8'(n); en = 1;
      rises = 0; prev = 0;
      for (int c = 1; c <= 2 * m * n + 20; c++) begin
        logic exp_sig;
        @(posedge clk); #1;
        exp_sig = (c <= 2 * m * n) && (((c - 1) % (2 * m)) < m);
        checks++;
        if (sig !== exp_sig) begin failures++; $display("FAIL t=%0d c=%0d sig=%b", t, c, sig); end
        if (sig && !prev) rises++;
        prev = sig;
      end
      checks++;
      if (rises != n) begin failures++; $display("FAIL rises=%0d n=%0d", rises, n); end
      @(negedge clk); en = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
