// tb_uart_tx: sends 100 random bytes, offered at random times. A receiver in
// the testbench waits for the start edge, samples each bit in its middle
// (a wrong bit time shifts the later samples off their bits) and checks the
// stop bit. It also checks that ready_o is low from acceptance to the end of
// the stop bit, so one byte takes 10 bit times.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d = '0;
  logic v = 1'b0, rdy, txd;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_rx = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data_i(d), .valid_i(v), .ready_o(rdy), .txd_o(txd));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: samples the middle of every bit, timed from the start edge
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(negedge clk);
      checks++;
      if (txd) begin failures++; $display("start bit too short"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      checks++;
      if (!txd) begin failures++; $display("stop bit low"); end
      checks++; n_rx++;
      if (q.size() == 0) begin failures++; $display("unexpected byte"); end
      else begin
        logic [7:0] e;
        e = q.pop_front();
        if (b !== e) begin failures++; $display("got %h exp %h", b, e); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 100; k++) begin
      int busy_len;
      busy_len = 0;
      d = 8'($urandom);
      v = 1'b1;
      while (!rdy) @(negedge clk);
      q.push_back(d);
      @(negedge clk);
      v = 1'b0;
      while (!rdy) begin @(negedge clk); busy_len++; end
      checks++;
      if (busy_len != 10 * CPB) begin failures++; $display("busy for %0d clocks", busy_len); end
      repeat (int'($urandom_range(0, 2 * CPB))) @(negedge clk);
    end
    repeat (2 * CPB) @(negedge clk);
    checks++;
    if (n_rx != 100) begin failures++; $display("received %0d", n_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
