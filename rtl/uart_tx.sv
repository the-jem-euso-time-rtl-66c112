// uart_tx: transmitter half of the full-duplex UART to the GPS module, used to
// send it commands.
//
// Frame: start bit, 8 data bits LSB first, stop bit (8N1), each bit
// CLKS_PER_BIT clocks long (4800 baud at 40 MHz by default, this design's
// choice). A byte is accepted when valid_i and ready_o are both high;
// ready_o is low from then until the stop bit has been sent. The line idles
// high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 8333
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_i,
  input  logic       valid_i,
  output logic       ready_o,
  output logic       txd_o
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;   // bits left to send, 0 = idle
  logic [8:0]    sh;     // {stop, data}, sent LSB first after the start bit

  assign ready_o = (bitn == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; bitn <= '0; sh <= '1; txd_o <= 1'b1;
    end else if (ready_o) begin
      txd_o <= 1'b1;
      if (valid_i) begin
        sh    <= {1'b1, data_i};
        bitn  <= 4'd10;
        cnt   <= '0;
        txd_o <= 1'b0;
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt  <= '0;
        bitn <= bitn - 1'b1;
        sh   <= {1'b1, sh[8:1]};
        txd_o <= (bitn == 4'd1) ? 1'b1 : sh[0];
      end
    end
  end

endmodule
