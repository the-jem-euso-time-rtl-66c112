// gtu_timing_gen: derives the slow timing signals of the focal surface from the
// 40 MHz system clock.
//
// A modulo-DIV_GTU counter makes the 400 kHz GTU clock (high for the first half
// of the period) and a one-clock strobe gtu_tick_o on its rising edge. Two
// further counters, advanced by gtu_tick_o, give the 100 kHz dead-time tick
// (GTU/DIV_DEAD) and the 3.125 kHz live-time tick (GTU/DIV_LIVE). All ticks
// are clock enables in the system-clock domain and coincide with a GTU
// rising edge. The frequencies follow the document; making the 100 kHz from
// the GTU clock, rather than directly from 40 MHz, is this design's choice.
//
// Timing: after reset the first gtu_tick_o is in the first clock with rst_n
// high; gtu_clk_o is high from that clock for DIV_GTU/2 clocks.
module gtu_timing_gen #(
  parameter int unsigned DIV_GTU  = 100,  // 40 MHz / 400 kHz
  parameter int unsigned DIV_DEAD = 4,    // 400 kHz / 100 kHz
  parameter int unsigned DIV_LIVE = 128   // 400 kHz / 3.125 kHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic gtu_clk_o,
  output logic gtu_tick_o,
  output logic tick_dead_o,
  output logic tick_live_o
);

  localparam int CW = $clog2(DIV_GTU);
  localparam int DW = (DIV_DEAD > 1) ? $clog2(DIV_DEAD) : 1;
  localparam int LW = (DIV_LIVE > 1) ? $clog2(DIV_LIVE) : 1;

  logic [CW-1:0] cnt;
  logic [DW-1:0] dcnt;
  logic [LW-1:0] lcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      dcnt <= '0;
      lcnt <= '0;
    end else begin
      cnt <= (cnt == CW'(DIV_GTU - 1)) ? '0 : cnt + 1'b1;
      if (gtu_tick_o) begin
        dcnt <= (dcnt == DW'(DIV_DEAD - 1)) ? '0 : dcnt + 1'b1;
        lcnt <= (lcnt == LW'(DIV_LIVE - 1)) ? '0 : lcnt + 1'b1;
      end
    end
  end

  always_comb begin
    gtu_tick_o  = rst_n && (cnt == '0);
    gtu_clk_o   = rst_n && (cnt < CW'(DIV_GTU / 2));
    tick_dead_o = gtu_tick_o && (dcnt == '0);
    tick_live_o = gtu_tick_o && (lcnt == '0);
  end

endmodule
