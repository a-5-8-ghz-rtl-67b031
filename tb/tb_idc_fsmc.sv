// tb_idc_fsmc: drives the FSMC's inputs directly and checks its state, its
// outputs and the oscillator code through every transition: off, listen
// (with and without self-hibernation), measure, watchdog recovery, SILENT,
// interrupt hold for exactly HOLD cycles, stop in DONE, wake-on entry and
// exit on a period boundary.
module tb_idc_fsmc;
  timeunit 1ns;
  timeprecision 1ps;
  import idc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic en = 0, wuo = 0, silent = 0, int_ctrl = 0, mode_ctrl = 0, monitor_ctrl = 0;
  logic wu_pe = 0, fm_det = 0, wdt_dn = 0, wo_dn = 0;
  logic [15:0] hold = 16'd5;
  logic [3:0] wu_n_cfg = 4'd6, wu_n;
  logic fm_en, wdt_en, wdt_clr, wo_en, wo_clr, int_r, m_ctrl, done;
  logic [7:0] osc;
  fsmc_state_t st;
  int checks = 0, failures = 0;

  idc_fsmc dut (.clk, .rst_n, .en_i(en), .wuo_i(wuo), .silent_i(silent), .hold_i(hold),
    .wu_n_cfg_i(wu_n_cfg), .int_ctrl_i(int_ctrl), .mode_ctrl_i(mode_ctrl),
    .monitor_ctrl_i(monitor_ctrl), .wu_pe_i(wu_pe), .fm_det_i(fm_det), .wdt_dn_i(wdt_dn),
    .wo_dn_i(wo_dn), .fm_en_o(fm_en), .wu_n_o(wu_n), .wdt_en_o(wdt_en), .wdt_clr_o(wdt_clr),
    .wo_en_o(wo_en), .wo_clr_o(wo_clr), .int_r_o(int_r), .m_ctrl_o(m_ctrl), .done_o(done),
    .osc_ctrl_o(osc), .state_o(st));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected outputs for a state
  task automatic expect_state(input fsmc_state_t s, input logic [7:0] code, input string what);
    checks++;
    if (st !== s || fm_en !== (s == S_MEAS) || wdt_en !== (s == S_MEAS) ||
        wdt_clr !== (s != S_MEAS) || wo_en !== (s == S_WO) || wo_clr !== (s != S_WO) ||
        int_r !== (s == S_INT) || done !== (s == S_DONE) || osc !== code) begin
      failures++;
      $display("FAIL %s: state=%0d exp=%0d osc=%0d exp=%0d", what, st, s, osc, code);
    end
  endtask
  task automatic step(); @(negedge clk); endtask
  task automatic pulse(ref logic sig); sig = 1; step(); sig = 0; endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(); expect_state(S_OFF, 8'd220, "reset");
    // continuous monitoring at the wake-up clock
    en = 1; monitor_ctrl = 1; step(); expect_state(S_LISTEN, 8'd14, "listen");
    pulse(wu_pe);  expect_state(S_MEAS, 8'd14, "edge -> measure");
    checks++; if (wu_n !== 4'd6) begin failures++; $display("FAIL wu_n latch"); end
    wu_n_cfg = 4'd3; step();
    checks++; if (wu_n !== 4'd6) begin failures++; $display("FAIL wu_n changed mid-measure"); end
    pulse(wdt_dn); expect_state(S_LISTEN, 8'd14, "watchdog -> listen");
    pulse(wu_pe);  expect_state(S_MEAS, 8'd14, "measure again");
    checks++; if (wu_n !== 4'd3) begin failures++; $display("FAIL wu_n relatch"); end
    silent = 1; step(); expect_state(S_LISTEN, 8'd14, "silent -> listen");
    pulse(wu_pe);  expect_state(S_LISTEN, 8'd14, "silent ignores edges");
    silent = 0;
    pulse(wu_pe);  expect_state(S_MEAS, 8'd14, "measure");
    pulse(fm_det);
    for (int c = 0; c < 5; c++) begin
      expect_state(S_INT, 8'd14, "interrupt held");
      step();
    end
    expect_state(S_LISTEN, 8'd14, "after hold, monitoring");
    // self-hibernation and stop after one wake-up
    mode_ctrl = 1; monitor_ctrl = 0; hold = 16'd1; step();
    expect_state(S_LISTEN, 8'd220, "hibernating");
    pulse(wu_pe); expect_state(S_MEAS, 8'd14, "woken from hibernation");
    pulse(fm_det); expect_state(S_INT, 8'd14, "hold 1");
    step(); expect_state(S_DONE, 8'd220, "done");
    repeat (5) step(); expect_state(S_DONE, 8'd220, "done stays");
    en = 0; step(); expect_state(S_OFF, 8'd220, "EN low");
    // wake-on mode
    en = 1; wuo = 1; step(); expect_state(S_WO, 8'd220, "wake-on");
    pulse(wu_pe); expect_state(S_WO, 8'd220, "wake-on ignores edges");
    wuo = 0; repeat (4) step(); expect_state(S_WO, 8'd220, "wait for period end");
    pulse(wo_dn); expect_state(S_LISTEN, 8'd220, "left wake-on");
    // manual interrupt select is registered through to m_ctrl
    int_ctrl = 1; step(); checks++; if (m_ctrl !== 1) begin failures++; $display("FAIL m_ctrl"); end
    int_ctrl = 0; step(); checks++; if (m_ctrl !== 0) begin failures++; $display("FAIL m_ctrl 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
