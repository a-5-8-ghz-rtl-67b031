// idc_afmu: adaptive frequency measurement unit (AFMU) of the IDC.
//
// While the FSMC enables it (fm_en = 1) the unit measures every period of the
// wake-up signal as the number of clock cycles between two successive rising
// edge pulses wu_pe. A period p is valid when NXFN <= p <= NNFX; this window is
// the controller's digital hysteresis: a wake-up tone may drift anywhere inside
// it (for example 11 kHz to 18 kHz around 14 kHz) and is still accepted. Each
// valid period increments a run counter, an invalid one clears it. When the run
// reaches WU_N consecutive valid periods, fm_det goes high and stays high until
// fm_en is dropped.
//
// The source gives the function (frequency estimate, range check, WU_N
// consecutive cycles); the period-counting method, the inclusive window and the
// sticky fm_det are this design's choices.
// Timing: fm_det rises one clock after the wu_pe pulse that closes the WU_N-th
// valid period. The period counter saturates, so a stopped signal never wraps
// back into the window. WU_N = 0 is treated as 1.
module idc_afmu
  import idc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fm_en_i,  // measurement enable from the FSMC
  input  logic             wu_pe_i,  // rising edge pulse from the SPEG
  input  logic [PER_W-1:0] nxfn_i,   // shortest accepted period, cycles
  input  logic [PER_W-1:0] nnfx_i,   // longest accepted period, cycles
  input  logic [WUN_W-1:0] wu_n_i,   // consecutive valid periods required
  output logic             fm_det_o  // WU_N valid periods seen
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             started_q;   // first edge seen, a period is running
  logic [PER_W-1:0] per_q;       // cycles since the last edge
  logic [WUN_W-1:0] run_q;       // consecutive valid periods
  logic             in_win;
  logic [WUN_W-1:0] need;

  always_comb begin
    in_win = (per_q >= nxfn_i) && (per_q <= nnfx_i);
    need   = (wu_n_i == '0) ? WUN_W'(1) : wu_n_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started_q <= 1'b0;
      per_q     <= '0;
      run_q     <= '0;
      fm_det_o  <= 1'b0;
    end else if (!fm_en_i) begin
      started_q <= 1'b0;
      per_q     <= '0;
      run_q     <= '0;
      fm_det_o  <= 1'b0;
    end else if (wu_pe_i) begin
      started_q <= 1'b1;
      per_q     <= PER_W'(1);
      if (started_q && !fm_det_o) begin
        if (in_win) begin
          if (run_q + WUN_W'(1) >= need) fm_det_o <= 1'b1;
          if (run_q != '1) run_q <= run_q + WUN_W'(1);
        end else begin
          run_q <= '0;
        end
      end
    end else if (started_q && per_q != '1) begin
      per_q <= per_q + PER_W'(1);
    end
  end

  // fm_det may only be raised while the FSMC keeps the unit enabled.
  a_det_needs_en: assert property (@(posedge clk) disable iff (!rst_n)
                                   fm_det_o |-> $past(fm_en_i));
endmodule
