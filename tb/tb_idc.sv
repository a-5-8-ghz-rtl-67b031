// tb_idc: the whole controller on a fixed 10 ns clock, so that every time is
// an exact number of controller cycles. A wake-up tone is a square wave of
// P cycles per period. Checks: a valid tone raises WK_INT exactly five clock
// edges after the rising edge that completes WU_N valid periods (the first
// edge wakes the FSMC, the second starts the measurement), and holds it for
// HOLD cycles; tones that are too fast, too slow or too short never raise it
// and the watchdog recovers; the self-test pattern, the external interrupt,
// wake-on mode, SILENT, DONE and the oscillator codes behave as specified.
module tb_idc;
  timeunit 1ns;
  timeprecision 1ps;
  import idc_pkg::*;
  logic clk = 0, rst_n = 1, wu_sig = 0, wu_ext = 0, en = 0, wuo = 0, silent = 0;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [3:0] ctrl = 0;
  idc_cfg_t cfg;
  logic wk_int, done;
  logic [7:0] osc;
  int checks = 0, failures = 0, cyc = 0;
  int n_wake = 0, n_reject = 0, n_wdt = 0, n_st = 0, n_ext = 0, n_wo = 0, n_silent = 0,
      n_done = 0, n_sh = 0;

  idc dut (.clk, .rst_n, .wu_sig_i(wu_sig), .wu_ext_i(wu_ext), .ctrl_i(ctrl), .en_i(en),
           .wuo_i(wuo), .silent_i(silent), .cfg_i(cfg), .wk_int_o(wk_int), .done_o(done),
           .osc_ctrl_o(osc));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.u_cwdt.wdt_dn_o) n_wdt++;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // Square wave of n periods of p cycles (high p/2 rounded up). Records the
  // cycle count at each rising edge (the edge that first samples it).
  int rise_cyc[$];
  int first_wk;
  task automatic tone(input int p, input int n);
    rise_cyc.delete();
    for (int i = 0; i < n; i++) begin
      @(negedge clk); wu_sig = 1; rise_cyc.push_back(cyc + 1);
      repeat ((p + 1) / 2 - 1) @(negedge clk);
      @(negedge clk); wu_sig = 0;
      repeat (p / 2 - 1) @(negedge clk);
    end
  endtask
  // watch WK_INT while a tone is sent
  int wk_cycles;
  task automatic tone_watch(input int p, input int n, input int tail);
    wk_cycles = 0; first_wk = -1;
    fork
      tone(p, n);
      begin
        repeat (p * n + tail) begin
          @(posedge clk); #1;
          if (wk_int) begin wk_cycles++; if (first_wk < 0) first_wk = cyc; end
        end
      end
    join
  endtask

  initial begin
    cfg = '{wu_n: 4'd5, nxfn: 8'd8, nnfx: 8'd13, wdtn: 16'd300, hold: 16'd40,
            twoi: 16'd12, twos: 16'd20, stm: 8'd5, stn: 8'd16};
    repeat (3) @(posedge clk);
    rst_n = 1;
    ctrl = 4'b1000;  // continuous monitoring, no hibernation
    en = 1;
    repeat (5) @(negedge clk);
    chk(osc == 8'd14, "wake-up oscillator code while listening");

    // 1. valid 14 kHz tone (10 cycles per period), 16 periods
    tone_watch(10, 16, 80);
    chk(wk_cycles == 40, "WK_INT held for HOLD cycles");
    chk(first_wk == rise_cyc[5 + 1] + 4, "WK_INT latency: 5 edges after edge WU_N+2");
    if (wk_cycles == 40) n_wake++;
    repeat (400) @(negedge clk);
    // 2. too fast, too slow, too short
    tone_watch(4, 30, 400);  chk(wk_cycles == 0, "too fast rejected");  n_reject++;
    tone_watch(24, 12, 400); chk(wk_cycles == 0, "too slow rejected");  n_reject++;
    cfg.wu_n = 4'd8;
    tone_watch(10, 8, 400);  chk(wk_cycles == 0, "too short rejected"); n_reject++;
    chk(n_wdt > 0, "watchdog fired");
    // valid tones at the window limits with WU_N = 8
    tone_watch(8, 14, 80);   chk(wk_cycles == 40, "8-cycle period accepted");  n_wake++;
    repeat (400) @(negedge clk);
    tone_watch(13, 12, 80);  chk(wk_cycles == 40, "13-cycle period accepted"); n_wake++;
    repeat (400) @(negedge clk);
    cfg.wu_n = 4'd5;
    // 3. SILENT
    silent = 1;
    tone_watch(10, 16, 80);  chk(wk_cycles == 0, "silent"); n_silent++;
    silent = 0;
    repeat (10) @(negedge clk);
    // 4. self-test: 16 periods of 10 cycles from the STPG, WU_SIG ignored
    ctrl = 4'b1001;
    tone_watch(3, 1, 300);   chk(wk_cycles == 40, "self-test valid pattern"); if (wk_cycles == 40) n_st++;
    ctrl = 4'b1000; repeat (10) @(negedge clk);
    cfg.stm = 8'd2;
    ctrl = 4'b1001;
    tone_watch(3, 1, 400);   chk(wk_cycles == 0, "self-test invalid pattern"); n_st++;
    ctrl = 4'b1000; cfg.stm = 8'd5;
    repeat (400) @(negedge clk);
    // 5. external interrupt
    ctrl = 4'b1010; repeat (4) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      wu_ext = 1'($urandom); @(negedge clk); chk(wk_int == wu_ext, "WK_INT follows WU_EXT");
    end
    n_ext++;
    wu_ext = 0; ctrl = 4'b1000; repeat (4) @(negedge clk);
    // 6. wake-on: period of 32 cycles, 12 high
    wuo = 1;
    begin
      int hi, lo; logic prev;
      hi = 0; lo = 0; prev = 0;
      repeat (5) @(negedge clk);
      repeat (32 * 4) begin @(posedge clk); #1; if (wk_int) hi++; else lo++; end
      chk(hi == 48 && lo == 80, $sformatf("wake-on duty %0d/%0d", hi, lo));
      chk(osc == 8'd220, "wake-on oscillator code");
      n_wo++;
    end
    wuo = 0;
    repeat (40) @(negedge clk);
    chk(!wk_int, "wake-on ended");
    // 7. self-hibernation, single shot with DONE
    ctrl = 4'b0100; repeat (4) @(negedge clk);
    chk(osc == 8'd220, "hibernation code"); n_sh++;
    tone_watch(10, 16, 80);  chk(wk_cycles == 40, "wake from hibernation"); n_wake++;
    chk(done, "DONE after wake-up"); n_done++;
    tone_watch(10, 16, 80);  chk(wk_cycles == 0, "no further wake-up after DONE");
    @(negedge clk); en = 0; @(negedge clk); en = 1; repeat (3) @(negedge clk);
    chk(!done, $sformatf("EN re-arms (state %0d)", dut.u_fsmc.state_q));
    // every mechanism must have happened
    chk(n_wake >= 4 && n_reject >= 3 && n_wdt > 0 && n_st == 2 && n_ext > 0 && n_wo > 0 &&
        n_silent > 0 && n_done > 0 && n_sh > 0, "all mechanisms exercised");
    $display("wake=%0d reject=%0d wdt=%0d selftest=%0d ext=%0d wakeon=%0d silent=%0d done=%0d sh=%0d",
             n_wake, n_reject, n_wdt, n_st, n_ext, n_wo, n_silent, n_done, n_sh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
