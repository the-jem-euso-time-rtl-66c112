// gps_model: behavioural stand-in for the GPS receiver module, for
// testbenches only. It produces the PPS pulse and sends NMEA sentences on a
// UART line (8N1, CLKS_PER_BIT clocks per bit, idle high). Tasks:
//   pps_pulse(len)  - one PPS pulse of len clocks
//   send(str)       - sends the characters of str
module gps_model #(
  parameter int unsigned CLKS_PER_BIT = 16
) (
  input  logic clk,
  output logic pps,
  output logic txd
);

  initial begin
    pps = 1'b0;
    txd = 1'b1;
  end

  task automatic pps_pulse(input int len);
    @(negedge clk) pps = 1'b1;
    repeat (len) @(negedge clk);
    pps = 1'b0;
  endtask

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) txd = f[i];
      repeat (CLKS_PER_BIT - 1) @(negedge clk);
    end
  endtask

  task automatic send(input string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

endmodule
