// tb_gtu_counter: two counters, the 24-bit default and a 5-bit one for the
// wrap case. GTU strobes come at random; Time-sync is raised at random GTU
// edges. A reference counter in the testbench predicts count and wrap flag
// after every clock.
module tb_gtu_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, sync = 1'b0;
  logic [23:0] cnt24;
  logic [4:0]  cnt5;
  logic        wrap24, wrap5;
  int checks = 0, failures = 0;
  longint ref_cnt = 0;
  bit ref_wrap5 = 0, ref_wrap24 = 0;
  int syncs = 0, wraps = 0;

  always #5 clk = ~clk;

  gtu_counter             dut24 (.clk, .rst_n, .gtu_tick_i(tick), .sync_i(sync), .count_o(cnt24), .wrap_o(wrap24));
  gtu_counter #(.W(5))    dut5  (.clk, .rst_n, .gtu_tick_i(tick), .sync_i(sync), .count_o(cnt5),  .wrap_o(wrap5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      tick = ($urandom_range(0, 2) == 0);
      sync = ($urandom_range(0, 400) == 0) || (i > 100 && i < 110);
      @(posedge clk);
      if (tick) begin
        if (sync) begin ref_cnt = 0; ref_wrap5 = 0; ref_wrap24 = 0; syncs++; end
        else begin
          if (ref_cnt % 32 == 31) begin ref_wrap5 = 1; wraps++; end
          if (ref_cnt % (1 << 24) == (1 << 24) - 1) ref_wrap24 = 1;
          ref_cnt++;
        end
      end
      @(negedge clk);
      checks++;
      if (cnt24 !== 24'(ref_cnt) || cnt5 !== 5'(ref_cnt) || wrap5 !== ref_wrap5 || wrap24 !== ref_wrap24) begin
        failures++;
        $display("i=%0d cnt24=%0d cnt5=%0d wrap5=%0b exp %0d %0b", i, cnt24, cnt5, wrap5, ref_cnt, ref_wrap5);
      end
    end
    checks++;
    if (syncs < 5 || wraps < 5) begin failures++; $display("syncs %0d wraps %0d", syncs, wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
