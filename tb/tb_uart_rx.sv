// tb_uart_rx: a serial source in the testbench sends 200 random bytes (8N1)
// at CLKS_PER_BIT = 32, some 3 % fast or slow, with random idle gaps. Also
// sent: short low glitches (must be ignored) and frames with a low stop bit
// (must give frame_err and no byte). Every byte received is compared with
// the byte sent.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rxd = 1'b1;
  logic [7:0] data;
  logic valid, ferr;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_rx = 0, n_ferr = 0, exp_ferr = 0;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd_i(rxd), .data_o(data), .valid_o(valid),
                                     .frame_err_o(ferr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (valid) begin
      checks++; n_rx++;
      if (q.size() == 0) begin failures++; $display("unexpected byte %h", data); end
      else begin
        logic [7:0] e;
        e = q.pop_front();
        if (data !== e) begin failures++; $display("got %h exp %h", data, e); end
      end
    end
    if (ferr) n_ferr++;
  end

  task automatic send(input logic [7:0] b, input int bit_len, input bit stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bit_len) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      logic [7:0] b;
      int bl;
      b = 8'($urandom);
      bl = (k % 3 == 0) ? CPB : ((k % 3 == 1) ? CPB - 1 : CPB + 1);
      if (k % 20 == 7) begin
        // glitch shorter than half a bit
        rxd = 1'b0; repeat (CPB / 4) @(negedge clk); rxd = 1'b1;
        repeat (2 * CPB) @(negedge clk);
      end
      if (k % 25 == 11) begin
        send(b, CPB, 1'b0); exp_ferr++;
        repeat (2 * CPB) @(negedge clk);
      end else begin
        q.push_back(b);
        send(b, bl, 1'b1);
      end
      repeat (int'($urandom_range(0, 3 * CPB))) @(negedge clk);
    end
    repeat (4 * CPB) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_rx != 200 - exp_ferr) begin failures++; $display("received %0d, %0d left", n_rx, q.size()); end
    checks++;
    if (n_ferr != exp_ferr) begin failures++; $display("frame errors %0d exp %0d", n_ferr, exp_ferr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
