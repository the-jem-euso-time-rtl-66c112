// ccb_gtu_tagger: the GTU time keeping of one Cluster Control Board (CCB).
//
// The CCB receives the GTU clock and the Time-sync line from the CLK board.
// Both lines pass a two-flop synchroniser; a rising edge of the GTU line
// advances a local GTU counter. Time-sync is sampled at the falling edge of
// the GTU line, half a GTU away from any change of it, and a high sample makes
// the counter load zero at the next rising edge, the same edge at which the
// CLK-board counter loads zero. Sampling mid-period makes the scheme immune to
// line skew of up to half a GTU (this design's choice). On each rising edge of the first-level trigger l1_i (a PDM data
// block being transferred) the current GTU number is latched and a header is
// produced for the data block: the trigger GTU, the GTU of the first sample,
// the number of GTUs in the block, the position of the trigger GTU in it and
// the sampling step (1 = consecutive GTUs, or e.g. every 10 or 100 GTUs for
// slow events). first_gtu = trig_gtu - trig_pos * step.
// The header contents follow the document; field widths and first_gtu are
// this design's choice. hdr_valid_o strobes 4 clocks after the l1_i edge.
module ccb_gtu_tagger
  import tsync_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       gtu_clk_i,
  input  logic       time_sync_i,
  input  logic       l1_i,
  input  logic [7:0] cfg_n_gtu_i,
  input  logic [7:0] cfg_trig_pos_i,
  input  logic [7:0] cfg_step_i,
  output ccb_hdr_t   hdr_o,
  output logic       hdr_valid_o,
  output logic [GTU_W-1:0] count_o,
  output logic       wrap_o
);

  logic g_s1, g_s2, g_q, t_s1, t_s2, l_s1, l_s2, l_q;
  logic gtu_tick, sync_armed;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {g_s1, g_s2, g_q, t_s1, t_s2, l_s1, l_s2, l_q} <= '0;
    end else begin
      g_s1 <= gtu_clk_i;   g_s2 <= g_s1;   g_q <= g_s2;
      t_s1 <= time_sync_i; t_s2 <= t_s1;
      l_s1 <= l1_i;        l_s2 <= l_s1;   l_q <= l_s2;
    end
  end

  assign gtu_tick = g_s2 && !g_q;

  always_ff @(posedge clk) begin
    if (!rst_n)              sync_armed <= 1'b0;
    else if (!g_s2 && g_q)   sync_armed <= t_s2;   // GTU falling edge
  end

  gtu_counter #(.W(GTU_W)) u_cnt (
    .clk, .rst_n, .gtu_tick_i(gtu_tick), .sync_i(sync_armed), .count_o(count_o), .wrap_o(wrap_o)
  );

  logic [GTU_W-1:0] back;
  assign back = GTU_W'(cfg_trig_pos_i) * GTU_W'(cfg_step_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hdr_o       <= '0;
      hdr_valid_o <= 1'b0;
    end else begin
      hdr_valid_o <= 1'b0;
      if (l_s2 && !l_q) begin
        hdr_o.trig_gtu  <= count_o;
        hdr_o.first_gtu <= count_o - back;
        hdr_o.n_gtu     <= cfg_n_gtu_i;
        hdr_o.trig_pos  <= cfg_trig_pos_i;
        hdr_o.step      <= cfg_step_i;
        hdr_valid_o     <= 1'b1;
      end
    end
  end

endmodule
