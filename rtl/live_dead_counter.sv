// live_dead_counter: the two counters that measure, for every event, the dead
// time t_m and the time between events t_ev.
//
// The dead-time counter counts 100 kHz ticks (10 us resolution) while dead_i
// is high, i.e. from the trigger sent to the IDAQ board until the IDAQ busy
// reply ends; when dead_i falls its value is copied to t_m_o (with
// t_m_valid_o for one clock) and it restarts from zero. The live-time counter
// counts 3.125 kHz ticks (320 us resolution) while dead_i is low; on each
// event strobe event_i its value is copied to t_ev_o and it restarts. Both
// are W = 18 bits wide as in the document (2.62 s and 83.9 s full scale).
// Counting live time only outside dead periods, so that the run time equals
// the sum of all t_ev and t_m, and saturating with a sticky overflow flag per
// measurement, are this design's reading of the document.
module live_dead_counter #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_dead_i,
  input  logic         tick_live_i,
  input  logic         event_i,     // trigger sent (start of dead time)
  input  logic         dead_i,      // high from trigger to end of busy
  output logic [W-1:0] t_ev_o,
  output logic         t_ev_ovf_o,
  output logic [W-1:0] t_m_o,
  output logic         t_m_ovf_o,
  output logic         t_m_valid_o
);

  logic [W-1:0] live_cnt, dead_cnt;
  logic         live_ovf, dead_ovf;
  logic         dead_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      live_cnt    <= '0;
      dead_cnt    <= '0;
      live_ovf    <= 1'b0;
      dead_ovf    <= 1'b0;
      dead_q      <= 1'b0;
      t_ev_o      <= '0;
      t_ev_ovf_o  <= 1'b0;
      t_m_o       <= '0;
      t_m_ovf_o   <= 1'b0;
      t_m_valid_o <= 1'b0;
    end else begin
      dead_q      <= dead_i;
      t_m_valid_o <= 1'b0;
      // live time
      if (event_i) begin
        t_ev_o     <= live_cnt;
        t_ev_ovf_o <= live_ovf;
        live_cnt   <= '0;
        live_ovf   <= 1'b0;
      end else if (!dead_i && tick_live_i) begin
        if (&live_cnt) live_ovf <= 1'b1;
        else           live_cnt <= live_cnt + 1'b1;
      end
      // dead time
      if (dead_q && !dead_i) begin
        t_m_o       <= dead_cnt;
        t_m_ovf_o   <= dead_ovf;
        t_m_valid_o <= 1'b1;
        dead_cnt    <= '0;
        dead_ovf    <= 1'b0;
      end else if (dead_i && tick_dead_i) begin
        if (&dead_cnt) dead_ovf <= 1'b1;
        else           dead_cnt <= dead_cnt + 1'b1;
      end
    end
  end

endmodule
