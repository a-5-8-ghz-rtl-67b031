// tb_wurx_top: end-to-end run of the wake-up receiver's digital core with all
// parameters at their defaults. The controller clock comes from the RC
// oscillator model, so the controller changes its own clock: about 14 kHz
// while it hibernates, about 140 kHz while it measures. Wake-up tones are
// square waves in real time, as the comparator would deliver them.
//
// Each mechanism is counted and must occur at least once: self-hibernation
// (slow clock measured), wake-up from hibernation (fast clock measured),
// accepted tones (14 kHz in hibernation and without it, 16 kHz), rejected tones (too fast, too slow,
// too short), watchdog recovery, SILENT, self-test (valid and invalid
// pattern), external interrupt, wake-on interrupts with their T_WOI/T_WOS
// timing, and the stop in DONE.
module tb_wurx_top;
  timeunit 1ns;
  timeprecision 1ps;
  import idc_pkg::*;
  logic rst_n = 1, osc_enb = 1, wu_sig = 0, wu_ext = 0, en = 0, wuo = 0, silent = 0;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [3:0] ctrl = 0;
  idc_cfg_t cfg;
  logic wk_int, done, clk;
  logic [7:0] osc_ctrl;
  int checks = 0, failures = 0;
  int n_wake = 0, n_reject = 0, n_wdt = 0, n_st = 0, n_ext = 0, n_wo = 0, n_silent = 0,
      n_done = 0, n_sh = 0, n_fast = 0;

  wurx_top dut (.rst_n, .osc_enb, .wu_sig, .wu_ext, .ctrl, .en, .wuo, .silent, .cfg,
                .wk_int, .done, .osc_ctrl, .clk);

  initial begin
    #2s; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (dut.u_idc.u_cwdt.wdt_dn_o) n_wdt++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // measured clock frequency over 4 periods
  task automatic clk_freq(output real f);
    realtime t0;
    @(posedge clk); t0 = $realtime;
    repeat (4) @(posedge clk);
    f = 4.0e9 / ($realtime - t0);
  endtask

  // tone of n periods at f_hz, watching WK_INT during it and for tail_ns after
  realtime wk_high_ns;
  logic    fast_seen;
  task automatic tone_watch(input real f_hz, input int n, input real tail_ns);
    real half;
    half = 0.5e9 / f_hz;
    wk_high_ns = 0; fast_seen = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          wu_sig = 1; #(half); wu_sig = 0; #(half);
        end
      end
      begin
        realtime stop;
        stop = $realtime + n * 2.0 * half + tail_ns;
        while ($realtime < stop) begin
          #1000;
          if (wk_int) wk_high_ns += 1000;
          if (osc_ctrl == 8'd14) fast_seen = 1;
        end
      end
    join
  endtask

  initial begin
    real f, t_hold;
    cfg = '{wu_n: 4'd5, nxfn: 8'd8, nnfx: 8'd13, wdtn: 16'd300, hold: 16'd100,
            twoi: 16'd10, twos: 16'd30, stm: 8'd5, stn: 8'd16};
    ctrl = 4'b1100;               // self-hibernation, continuous monitoring
    #10us; osc_enb = 0;
    #100us; rst_n = 1; en = 1;
    #1ms;
    // self-hibernation: slow clock
    clk_freq(f);
    chk(osc_ctrl == 8'd220 && f > 13000 && f < 15000, $sformatf("hibernation clock %f Hz", f));
    n_sh++;
    // the nominal DSRC tone, 14 kHz for 16 periods, while hibernating at a
    // clock of about the same frequency: wakes the oscillator, then WK_INT
    t_hold = 100.0 * 1.0e9 / 140000.0;   // HOLD cycles at about 140 kHz
    tone_watch(14000.0, 16, 2.0e6);
    chk(fast_seen, "oscillator switched to the wake-up code");
    chk(wk_high_ns > 0.9 * t_hold && wk_high_ns < 1.1 * t_hold,
        $sformatf("WK_INT for T_HOLD, %f ns", wk_high_ns));
    if (wk_high_ns > 0) n_wake++;
    if (fast_seen) n_fast++;
    #2ms;
    chk(osc_ctrl == 8'd220, "back in hibernation");
    // 16 kHz, 17 periods: accepted
    tone_watch(16000.0, 17, 2.0e6);
    chk(wk_high_ns > 0.9 * t_hold && wk_high_ns < 1.1 * t_hold, "16 kHz accepted");
    if (wk_high_ns > 0) n_wake++;
    #2ms;
    // rejections
    tone_watch(30000.0, 30, 4.0e6); chk(wk_high_ns == 0, "30 kHz rejected"); n_reject++;
    tone_watch(7000.0, 15, 4.0e6);  chk(wk_high_ns == 0, "7 kHz rejected");  n_reject++;
    tone_watch(13500.0, 5, 4.0e6);  chk(wk_high_ns == 0, "5-period burst rejected"); n_reject++;
    chk(n_wdt > 0, "watchdog recovery");
    // SILENT
    silent = 1;
    tone_watch(13000.0, 16, 2.0e6); chk(wk_high_ns == 0, "silent"); n_silent++;
    silent = 0;
    #1ms;
    // self-test: STPG pattern of 10-cycle periods, WU_SIG idle
    ctrl = 4'b1101;
    tone_watch(1.0e6, 0, 6.0e6);
    chk(wk_high_ns > 0.9 * t_hold, "self-test valid pattern"); n_st++;
    ctrl = 4'b1100; #1ms;
    cfg.stm = 8'd2;
    ctrl = 4'b1101;
    tone_watch(1.0e6, 0, 6.0e6);
    chk(wk_high_ns == 0, "self-test invalid pattern"); n_st++;
    ctrl = 4'b1100; cfg.stm = 8'd5; #1ms;
    // external interrupt
    ctrl = 4'b1110; #1ms;
    wu_ext = 1; #500us; chk(wk_int, "external interrupt high");
    wu_ext = 0; #500us; chk(!wk_int, "external interrupt low"); n_ext++;
    ctrl = 4'b1100; #1ms;
    // wake-on: T_WOI = 10 and T_WOS = 30 cycles of the ~14 kHz clock
    wuo = 1;
    begin
      realtime t_rise, t_fall, t_next;
      @(posedge wk_int); t_rise = $realtime;
      @(negedge wk_int); t_fall = $realtime;
      @(posedge wk_int); t_next = $realtime;
      chk((t_fall - t_rise) > 10 * 0.95e9 / 15000.0 && (t_fall - t_rise) < 10 * 1.05e9 / 13000.0,
          $sformatf("T_WOI %f ns", t_fall - t_rise));
      chk((t_next - t_fall) > 30 * 0.95e9 / 15000.0 && (t_next - t_fall) < 30 * 1.05e9 / 13000.0,
          $sformatf("T_WOS %f ns", t_next - t_fall));
      n_wo++;
    end
    wuo = 0;
    #10ms;
    chk(!wk_int && dut.u_idc.u_fsmc.state_q == S_LISTEN, "wake-on left");
    // single shot without hibernation (clock stays at ~140 kHz), then DONE
    ctrl = 4'b0000; #1ms;
    chk(osc_ctrl == 8'd14, "no hibernation: wake-up code while listening");
    tone_watch(14000.0, 16, 2.0e6);
    chk(wk_high_ns > 0.9 * t_hold && done, $sformatf("DONE after wake-up (%f ns, state %0d)", wk_high_ns, dut.u_idc.u_fsmc.state_q));
    if (done) n_done++;
    tone_watch(14000.0, 16, 2.0e6);
    chk(wk_high_ns == 0, "no wake-up after DONE");
    chk(n_wake >= 2 && n_reject >= 3 && n_wdt > 0 && n_st >= 2 && n_ext > 0 && n_wo > 0 &&
        n_silent > 0 && n_done > 0 && n_sh > 0 && n_fast > 0, "all mechanisms exercised");
    $display("wake=%0d reject=%0d wdt=%0d selftest=%0d ext=%0d wakeon=%0d silent=%0d done=%0d hibernate=%0d fastclk=%0d",
             n_wake, n_reject, n_wdt, n_st, n_ext, n_wo, n_silent, n_done, n_sh, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
