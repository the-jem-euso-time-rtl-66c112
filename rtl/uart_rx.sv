// uart_rx: receiver half of the full-duplex UART that links the CLK board to
// the GPS module (NMEA-0183 output).
//
// Frame: one start bit, 8 data bits LSB first, one stop bit, no parity. The
// line passes a two-flop synchroniser. A falling edge starts a frame; the
// start bit is checked again in its middle (a shorter low is ignored) and
// every following bit is sampled in its middle, CLKS_PER_BIT clocks apart. At
// the middle of the stop bit the byte is presented on data_o with valid_o
// high for one clock; a low stop bit gives frame_err_o instead and no byte.
// The bit time defaults to 4800 baud at 40 MHz, the usual NMEA rate; the
// document gives no rate.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 8333
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd_i,
  output logic [7:0] data_o,
  output logic       valid_o,
  output logic       frame_err_o
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e       state;
  logic          rx_s1, rx_s2;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1;
      state <= R_IDLE; cnt <= '0; bitn <= '0; sh <= '0;
      data_o <= '0; valid_o <= 1'b0; frame_err_o <= 1'b0;
    end else begin
      rx_s1 <= rxd_i;
      rx_s2 <= rx_s1;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx_s2) begin
          state <= R_START;
          cnt   <= '0;
        end
        R_START: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!rx_s2) begin state <= R_DATA; bitn <= '0; end
            else        state <= R_IDLE;
          end
        end
        R_DATA: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {rx_s2, sh[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end
        end
        R_STOP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            state <= R_IDLE;
            if (rx_s2) begin data_o <= sh; valid_o <= 1'b1; end
            else       frame_err_o <= 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
