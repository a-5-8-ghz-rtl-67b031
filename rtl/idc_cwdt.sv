// idc_cwdt: configurable watchdog timer (CWDT) of the IDC.
//
// The FSMC starts the timer with wdt_en while it measures a wake-up signal.
// The timer counts enabled clock cycles; after WDTN of them it raises wdt_dn,
// which sends the FSMC back to its initial state so that a weak, broken or
// false wake-up signal cannot leave the controller stuck. wdt_clr (priority
// over wdt_en) clears the count and wdt_dn. wdt_dn is sticky until cleared.
// WDTN = 0 disables the time-out.
// The source gives the role of wdt_en, wdt_clr, wdt_dn and WDTN; the counter
// width and the sticky done flag are this design's choices.
// Timing: with wdt_en high from clock edge 1 on, wdt_dn is high after edge WDTN.
module idc_cwdt
  import idc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wdt_en_i,
  input  logic             wdt_clr_i,
  input  logic [TMR_W-1:0] wdtn_i,
  output logic             wdt_dn_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [TMR_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      wdt_dn_o <= 1'b0;
    end else if (wdt_clr_i) begin
      cnt_q    <= '0;
      wdt_dn_o <= 1'b0;
    end else if (wdt_en_i && !wdt_dn_o && wdtn_i != '0) begin
      cnt_q <= cnt_q + TMR_W'(1);
      if (cnt_q + TMR_W'(1) == wdtn_i) wdt_dn_o <= 1'b1;
    end
  end
endmodule
