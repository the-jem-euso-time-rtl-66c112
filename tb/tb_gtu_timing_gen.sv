// tb_gtu_timing_gen: checks the GTU clock and the slow ticks cycle by cycle
// against a reference built from a plain cycle count n since reset:
// gtu_tick at n % 100 == 0, gtu_clk high for n % 100 < 50, 100 kHz tick at
// n % 400 == 0, 3.125 kHz tick at n % 12800 == 0 (40 MHz system clock).
module tb_gtu_timing_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gtu_clk, gtu_tick, tick_dead, tick_live;
  int checks = 0, failures = 0;
  int n_tick = 0, n_dead = 0, n_live = 0;

  always #5 clk = ~clk;

  gtu_timing_gen dut (.clk, .rst_n, .gtu_clk_o(gtu_clk), .gtu_tick_o(gtu_tick),
                      .tick_dead_o(tick_dead), .tick_live_o(tick_live));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1;
    for (int n = 0; n < 3 * 12800 + 7; n++) begin
      checks++;
      if (gtu_tick  !== (n % 100 == 0))   begin failures++; $display("gtu_tick n=%0d", n); end
      if (gtu_clk   !== (n % 100 < 50))   begin failures++; $display("gtu_clk n=%0d", n); end
      if (tick_dead !== (n % 400 == 0))   begin failures++; $display("tick_dead n=%0d", n); end
      if (tick_live !== (n % 12800 == 0)) begin failures++; $display("tick_live n=%0d", n); end
      n_tick += int'(gtu_tick); n_dead += int'(tick_dead); n_live += int'(tick_live);
      @(negedge clk);
      #1;
    end
    checks++;
    if (n_tick != 385 || n_dead != 97 || n_live != 4) begin
      failures++; $display("tick counts %0d %0d %0d", n_tick, n_dead, n_live);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
