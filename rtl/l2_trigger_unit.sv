// l2_trigger_unit: receives the second-level (L2) trigger lines of the CCBs,
// registers the trigger pattern and drives the trigger/busy exchange with the
// IDAQ board.
//
// Each L2 line passes a two-flop synchroniser and an edge detector. The first
// rising edge seen while idle starts an event: the pattern register is
// cleared and then, for win_len_i clocks, every line that rises is added to
// the pattern and the CLK-board GTU count at its edge is latched in that
// line's register l2_gtu_o[i], so that the difference in arrival time of
// the L2 triggers of different CCBs is known in GTUs. At the end of the window
// the trigger to IDAQ (trig_o) is raised for TRIG_LEN clocks and event_o
// strobes for one clock. The unit is then dead until the IDAQ busy reply has
// risen and fallen again; if busy has not risen after BUSY_TIMEOUT clocks the
// unit returns idle and sets the sticky flag busy_timeout_o. L2 edges arriving
// while dead are only counted in lost_o (saturating).
// The document asks for the pattern register, the GTU latch per L2 trigger
// and the trigger/busy exchange; the window, the pulse length, the timeout
// and the lost-trigger count are this design's choices.
// Timing: an edge on l2_i reaches the unit 3 clocks later; trig_o rises
// win_len_i + 1 clocks after that (win_len_i = 0: next clock).
module l2_trigger_unit #(
  parameter int unsigned N            = 18,
  parameter int unsigned GTU_W        = 24,
  parameter int unsigned TRIG_LEN     = 4,
  parameter int unsigned BUSY_TIMEOUT = 40000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         l2_i,
  input  logic [GTU_W-1:0]     gtu_count_i,
  input  logic [15:0]          win_len_i,
  input  logic                 busy_i,
  output logic                 trig_o,
  output logic                 event_o,
  output logic                 dead_o,
  output logic [N-1:0]         pattern_o,
  output logic [GTU_W-1:0]     l2_gtu_o [N],
  output logic [15:0]          lost_o,
  output logic                 busy_timeout_o
);

  typedef enum logic [2:0] {S_IDLE, S_WINDOW, S_TRIG, S_WAIT_BUSY, S_DEAD} state_e;
  state_e state;

  localparam int TW = $clog2(BUSY_TIMEOUT + 1) > $clog2(TRIG_LEN + 1)
                    ? $clog2(BUSY_TIMEOUT + 1) : $clog2(TRIG_LEN + 1);

  logic [N-1:0] l2_s1, l2_s2, l2_q, rise;
  logic         busy_s1, busy_s2;
  logic [15:0]  wcnt;
  logic [TW-1:0] tcnt;

  assign rise   = l2_s2 & ~l2_q;
  assign dead_o = (state == S_TRIG) || (state == S_WAIT_BUSY) || (state == S_DEAD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l2_s1 <= '0; l2_s2 <= '0; l2_q <= '0;
      busy_s1 <= 1'b0; busy_s2 <= 1'b0;
      state <= S_IDLE;
      wcnt <= '0; tcnt <= '0;
      trig_o <= 1'b0; event_o <= 1'b0;
      pattern_o <= '0;
      for (int i = 0; i < int'(N); i++) l2_gtu_o[i] <= '0;
      lost_o <= '0;
      busy_timeout_o <= 1'b0;
    end else begin
      l2_s1   <= l2_i;
      l2_s2   <= l2_s1;
      l2_q    <= l2_s2;
      busy_s1 <= busy_i;
      busy_s2 <= busy_s1;
      event_o <= 1'b0;
      unique case (state)
        S_IDLE: if (|rise) begin
          pattern_o <= rise;
          for (int i = 0; i < int'(N); i++)
            l2_gtu_o[i] <= rise[i] ? gtu_count_i : '0;
          wcnt <= '0;
          if (win_len_i == 16'd0) begin
            state <= S_TRIG; trig_o <= 1'b1; event_o <= 1'b1; tcnt <= '0;
          end else begin
            state <= S_WINDOW;
          end
        end
        S_WINDOW: begin
          pattern_o <= pattern_o | rise;
          for (int i = 0; i < int'(N); i++)
            if (rise[i] && !pattern_o[i]) l2_gtu_o[i] <= gtu_count_i;
          wcnt <= wcnt + 1'b1;
          if (wcnt + 16'd1 >= win_len_i) begin
            state <= S_TRIG; trig_o <= 1'b1; event_o <= 1'b1; tcnt <= '0;
          end
        end
        S_TRIG: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(TRIG_LEN - 1)) begin
            trig_o <= 1'b0;
            tcnt   <= '0;
            state  <= S_WAIT_BUSY;
          end
        end
        S_WAIT_BUSY: begin
          tcnt <= tcnt + 1'b1;
          if (busy_s2) begin
            state <= S_DEAD;
          end else if (tcnt == TW'(BUSY_TIMEOUT - 1)) begin
            busy_timeout_o <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_DEAD: if (!busy_s2) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (dead_o && |rise && !(&lost_o)) lost_o <= lost_o + 1'b1;
    end
  end

  // The trigger pulse is only ever raised together with the event strobe.
  a_trig_start: assert property (@(posedge clk) disable iff (!rst_n)
                                 $rose(trig_o) |-> event_o);

endmodule
