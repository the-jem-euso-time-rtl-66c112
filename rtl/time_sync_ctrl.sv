// time_sync_ctrl: makes the Time-sync signal that initialises every GTU
// counter of the system.
//
// A command pulse (sync_req_i) is remembered until the next GTU rising edge
// (gtu_tick_i). At that edge time_sync_o goes high and stays high for exactly
// one GTU period; at the following GTU edge every counter that samples it,
// on the CLK board and on all CCBs, loads zero, and time_sync_o falls. The
// signal is thus synchronous with the GTU clock, as the document requires;
// the one-GTU length and the "load at the edge where Time-sync is seen high"
// rule are this design's choices. A request made while a pulse is running is
// kept and served after it.
module time_sync_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic sync_req_i,   // command from the controlling CPU
  input  logic gtu_tick_i,   // GTU rising-edge strobe
  output logic time_sync_o,  // Time-sync level, one GTU long
  output logic pending_o     // request waiting for a GTU edge
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      time_sync_o <= 1'b0;
      pending_o   <= 1'b0;
    end else begin
      if (gtu_tick_i) begin
        time_sync_o <= pending_o && !time_sync_o;
        pending_o   <= (pending_o && time_sync_o) || sync_req_i;
      end else if (sync_req_i) begin
        pending_o <= 1'b1;
      end
    end
  end

endmodule
