// clock_fanout: distributes the GTU clock and the Time-sync signal to the N
// CCB lines.
//
// Every line has its own output register, as the fan-out FPGA would drive a
// separate LVDS pair per CCB (point-to-point links). A per-line enable en_i
// lets unused lines be held low; it is sampled into the active mask only
// while the GTU clock is low, so switching a line on or off never produces a
// shortened GTU pulse. The enable and its glitch-free switching are this
// design's additions; the document only asks for the fan-out.
// Timing: outputs follow the inputs by one clock.
module clock_fanout #(
  parameter int unsigned N = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gtu_clk_i,
  input  logic         time_sync_i,
  input  logic [N-1:0] en_i,
  output logic [N-1:0] gtu_clk_o,
  output logic [N-1:0] time_sync_o,
  output logic [N-1:0] active_o     // enables now in force
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_o    <= '0;
      gtu_clk_o   <= '0;
      time_sync_o <= '0;
    end else begin
      if (!gtu_clk_i) active_o <= en_i;
      gtu_clk_o   <= {N{gtu_clk_i}}   & active_o;
      time_sync_o <= {N{time_sync_i}} & active_o;
    end
  end

endmodule
