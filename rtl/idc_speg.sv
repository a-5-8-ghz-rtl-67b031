// idc_speg: signal positive edge generator (SPEG) of the IDC.
//
// Turns each rising edge of the selected wake-up signal into a one-clock pulse
// wu_pe. The input comes from an analog comparator and is asynchronous to the
// controller clock, and while the controller hibernates its clock (about
// 14 kHz) is no faster than the wake-up tone itself. Plain sampling would then
// alias the tone into a slow beat and could miss its edges for many periods.
// So the edge is captured by the signal itself: a toggle flop clocked by the
// rising edge of sig_i flips on every upward transition. The toggle is passed
// through a two-flop synchronizer, and a change of the synchronized toggle
// gives the pulse. Every rising edge is reported once as long as successive
// rising edges are more than one clock period apart; two within one period
// cancel.
// The source says only that the block detects upward transitions and makes the
// pulse wu_pe; the toggle capture and the synchronizer are this design's.
// Timing: a rising edge that comes before clock edge k (with setup) gives
// wu_pe high in the cycle after clock edge k+2, i.e. three clock edges of
// latency. Pulses shorter than a clock period are still caught.
// The toggle flop forms a second clock domain (clocked by sig_i); it is reset
// only by the falling edge of the asynchronous reset, since the controller
// clock never reaches it.
module idc_speg (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_i,    // selected wake-up signal
  output logic wu_pe_o   // one-cycle pulse per rising edge
);
  timeunit 1ns;
  timeprecision 1ps;

  logic tog_q;                    // flips on every rising edge of sig_i
  logic meta_q, sync_q, prev_q;

  always_ff @(posedge sig_i or negedge rst_n) begin
    if (!rst_n) tog_q <= 1'b0;
    else        tog_q <= ~tog_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q  <= 1'b0;
      sync_q  <= 1'b0;
      prev_q  <= 1'b0;
      wu_pe_o <= 1'b0;
    end else begin
      meta_q  <= tog_q;
      sync_q  <= meta_q;
      prev_q  <= sync_q;
      wu_pe_o <= sync_q ^ prev_q;
    end
  end
endmodule
