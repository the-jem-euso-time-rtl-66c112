// gtu_counter: GTU counter of the CLK board and of each CCB.
//
// The counter advances by one on every GTU edge strobe (gtu_tick_i). When the
// Time-sync level sync_i is high at a GTU edge the counter loads zero instead,
// so that all counters of the system, fed by the same GTU clock and Time-sync
// lines, hold the same number. Width W defaults to the 24 bits the document
// asks for. If the counter wraps from all-ones to zero it sets the sticky
// flag wrap_o (this design's choice), cleared by the next Time-sync.
// Timing: count_o changes in the clock after the strobe.
module gtu_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gtu_tick_i,
  input  logic         sync_i,
  output logic [W-1:0] count_o,
  output logic         wrap_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count_o <= '0;
      wrap_o  <= 1'b0;
    end else if (gtu_tick_i) begin
      if (sync_i) begin
        count_o <= '0;
        wrap_o  <= 1'b0;
      end else begin
        count_o <= count_o + 1'b1;
        if (&count_o) wrap_o <= 1'b1;
      end
    end
  end

endmodule
