// idc_stpg: self-test pattern generator (STPG) of the IDC.
//
// In self-test mode the controller checks itself without an RF signal: the
// STPG produces a square wave st_sig that the SSM feeds to the controller in
// place of the comparator output. When st_en rises, the generator outputs STN
// periods, each high for STM cycles and low for STM cycles, then stays low
// until st_en is dropped and raised again. Choosing STM and STN makes valid or
// invalid wake-up signals (too fast, too slow, too few cycles).
// The source gives the purpose and the two settings (frequency and period
// count); reading STM as the half period in clock cycles is this design's
// choice. STM = 0 counts as 1; STN = 0 gives no pulse.
// Timing: st_sig is high after the clock edge that sees st_en first high.
module idc_stpg
  import idc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            st_en_i,
  input  logic [ST_W-1:0] stm_i,    // half period, cycles
  input  logic [ST_W-1:0] stn_i,    // number of periods
  output logic            st_sig_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic            en_q;     // st_en of the previous cycle
  logic            busy_q;
  logic [ST_W-1:0] left_q;   // periods still to send, current one included
  logic [ST_W-1:0] cnt_q;
  logic [ST_W-1:0] half;

  always_comb half = (stm_i == '0) ? ST_W'(1) : stm_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q     <= 1'b0;
      busy_q   <= 1'b0;
      left_q   <= '0;
      cnt_q    <= '0;
      st_sig_o <= 1'b0;
    end else begin
      en_q <= st_en_i;
      if (!st_en_i) begin
        busy_q   <= 1'b0;
        st_sig_o <= 1'b0;
        cnt_q    <= '0;
      end else if (!en_q) begin
        // st_en has just risen: start the first period
        busy_q   <= (stn_i != '0);
        st_sig_o <= (stn_i != '0);
        left_q   <= stn_i;
        cnt_q    <= '0;
      end else if (busy_q) begin
        if (cnt_q + ST_W'(1) >= half) begin
          cnt_q <= '0;
          if (st_sig_o) begin
            st_sig_o <= 1'b0;
          end else if (left_q > ST_W'(1)) begin
            left_q   <= left_q - ST_W'(1);
            st_sig_o <= 1'b1;
          end else begin
            left_q <= '0;
            busy_q <= 1'b0;
          end
        end else begin
          cnt_q <= cnt_q + ST_W'(1);
        end
      end
    end
  end
endmodule
