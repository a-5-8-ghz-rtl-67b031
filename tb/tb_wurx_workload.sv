// tb_wurx_workload: the DSRC wake-up workloads on the oscillator + IDC loop
// with default parameters. A wake-up call is an OOK tone of 15 to 17 periods
// at nominally 14 kHz; the receiver must tolerate 11 kHz to 18 kHz, and the
// controller is set to demand WU_N = 5 to 8 valid periods.
//
// Sweep, with and without self-hibernation: tone 11..18 kHz in 1 kHz steps,
// 15/16/17 periods, WU_N 5 and 8; every call must raise WK_INT for T_HOLD.
// Rejections: 9 kHz and 24 kHz tones, and bursts one period too short.
// Shortest accepted burst: WU_N + 2 periods at the wake-up clock, up to
// WU_N + 6 when the call arrives while the controller hibernates (the slow
// clock needs three to four and a half of its cycles to notice the first edge
// and switch the oscillator). With WU_N <= 8 both fit a 15-period call.
//
// Window at the ~140.4 kHz wake-up clock: NXFN = 7, NNFX = 13 cycles. An
// 18 kHz period is 7.8 cycles and is measured as 7 or 8; 11 kHz is 12.8, so
// 12 or 13; 9 kHz (15.6) and 24 kHz (5.9) fall outside.
module tb_wurx_workload;
  timeunit 1ns;
  timeprecision 1ps;
  import idc_pkg::*;
  logic rst_n = 1, osc_enb = 1, wu_sig = 0, wu_ext = 0, en = 0, wuo = 0, silent = 0;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [3:0] ctrl = 0;
  idc_cfg_t cfg;
  logic wk_int, done, clk;
  logic [7:0] osc_ctrl;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;

  wurx_top dut (.rst_n, .osc_enb, .wu_sig, .wu_ext, .ctrl, .en, .wuo, .silent, .cfg,
                .wk_int, .done, .osc_ctrl, .clk);

  initial begin
    #5s; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sends one call and reports how long WK_INT was high (ns)
  task automatic call(input real f_hz, input int n, output real wk_ns);
    real half;
    half = 0.5e9 / f_hz;
    wk_ns = 0;
    fork
      for (int i = 0; i < n; i++) begin wu_sig = 1; #(half); wu_sig = 0; #(half); end
      begin
        realtime stop;
        stop = $realtime + n * 2.0 * half + 2.0e6;
        while ($realtime < stop) begin #1000; if (wk_int) wk_ns += 1000; end
      end
    join
    #3ms;   // back to listening (and hibernation) before the next call
  endtask

  initial begin
    real wk, t_hold;
    cfg = '{wu_n: 4'd5, nxfn: 8'd7, nnfx: 8'd13, wdtn: 16'd400, hold: 16'd100,
            twoi: 16'd10, twos: 16'd30, stm: 8'd5, stn: 8'd16};
    t_hold = 100.0 * 1.0e9 / 140400.0;
    #10us; osc_enb = 0;
    #100us; rst_n = 1; en = 1;
    for (int sh = 0; sh < 2; sh++) begin
      ctrl = sh ? 4'b1100 : 4'b1000;
      #1ms;
      for (int wn = 5; wn <= 8; wn += 3) begin
        cfg.wu_n = 4'(wn);
        for (int f = 11; f <= 18; f++) begin
          for (int n = 15; n <= 17; n++) begin
            call(f * 1000.0, n, wk);
            checks++;
            if (wk < 0.9 * t_hold || wk > 1.1 * t_hold) begin
              failures++;
              $display("FAIL sh=%0d WU_N=%0d %0d kHz x%0d: WK_INT %f ns", sh, wn, f, n, wk);
            end else n_acc++;
          end
        end
        // shortest accepted burst: WU_N + 2 periods at the wake-up clock; while
        // hibernating, waking the slow clock costs three or four more periods
        call(14000.0, wn + (sh ? 6 : 2), wk);
        checks++; if (wk < 0.9 * t_hold) begin failures++; $display("FAIL shortest burst sh=%0d", sh); end
        else n_acc++;
        call(14000.0, wn + (sh ? 4 : 1), wk);
        checks++; if (wk != 0) begin failures++; $display("FAIL burst one short sh=%0d", sh); end
        else n_rej++;
        // out of band
        call(9000.0, 17, wk);
        checks++; if (wk != 0) begin failures++; $display("FAIL 9 kHz sh=%0d", sh); end
        else n_rej++;
        call(24000.0, 17, wk);
        checks++; if (wk != 0) begin failures++; $display("FAIL 24 kHz sh=%0d", sh); end
        else n_rej++;
      end
    end
    $display("accepted=%0d rejected=%0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
