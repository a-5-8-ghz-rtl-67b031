// idc_wog: wake-on generator (WOG) of the IDC.
//
// In wake-on mode the receiver does not wait for a wake-up tone: the WOG wakes
// the transceiver periodically ("pseudo-synchronous" interrupts). While wo_en
// is high, WO_INT is high for T_WOI cycles, then low for T_WOS cycles, and so
// on, starting with the high interval as in the timing diagram. wo_dn pulses
// for one cycle when a full period (high plus low) has ended; the FSMC uses it
// to leave wake-on mode only on a period boundary. wo_clr (priority over wo_en)
// restarts the generator at the beginning of a high interval. Dropping wo_en
// without wo_clr freezes the phase and forces WO_INT low.
// The interval names come from the source; the meaning of wo_dn and wo_clr and
// the freeze behaviour are this design's choices. An interval of 0 counts as 1.
// Timing: with wo_en high from clock edge 1 on, WO_INT is high after edges
// 1 .. T_WOI and low for the next T_WOS cycles; wo_dn is high for the cycle
// after edge 1+T_WOI+T_WOS, when the next high interval starts.
module idc_wog
  import idc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wo_en_i,
  input  logic             wo_clr_i,
  input  logic [TMR_W-1:0] twoi_i,   // high interval, cycles
  input  logic [TMR_W-1:0] twos_i,   // low interval, cycles
  output logic             wo_int_o,
  output logic             wo_dn_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             run_q;
  logic             high_q;   // 1: in the T_WOI interval
  logic [TMR_W-1:0] cnt_q;
  logic [TMR_W-1:0] len;

  always_comb len = high_q ? twoi_i : twos_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      high_q  <= 1'b1;
      cnt_q   <= '0;
      wo_dn_o <= 1'b0;
    end else if (wo_clr_i) begin
      run_q   <= 1'b0;
      high_q  <= 1'b1;
      cnt_q   <= '0;
      wo_dn_o <= 1'b0;
    end else if (wo_en_i) begin
      run_q   <= 1'b1;
      wo_dn_o <= 1'b0;
      if (run_q) begin
        if (cnt_q + TMR_W'(1) >= len) begin
          cnt_q  <= '0;
          high_q <= ~high_q;
          if (!high_q) wo_dn_o <= 1'b1;
        end else begin
          cnt_q <= cnt_q + TMR_W'(1);
        end
      end
    end else begin
      run_q   <= 1'b0;
      wo_dn_o <= 1'b0;
    end
  end

  always_comb wo_int_o = run_q & high_q;
endmodule
