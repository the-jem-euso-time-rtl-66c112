// tb_trigger_interval: the counting chain of the CLK board at its real rates
// over the trigger interval it is sized for. gtu_timing_gen (40 MHz in,
// 400 kHz GTU, 100 kHz and 3.125 kHz ticks), a 24-bit gtu_counter and the
// 18-bit live_dead_counter all run with their default parameters.
// After a Time-sync, an event follows 10 s later (a 0.1 Hz trigger rate),
// with a 20 ms dead time. The checks:
//   GTU counter = 4 000 000 with no wrap (2^24 GTU = 41.9 s would be needed);
//   live time t_ev = 10 s / 320 us = 31 250;
//   dead time t_m = 20 ms / 10 us = 2 000.
// This runs 4e8 system clocks. The testbench waits with single delays
// of 1000 clocks rather than clock by clock, so that the simulation stays fast.
module tb_trigger_interval;
  import tsync_pkg::*;
  localparam int SYS = 40_000_000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gtu_clk, gtu_tick, tick_dead, tick_live;
  logic sync = 1'b0, ev = 1'b0, dead = 1'b0;
  logic [GTU_W-1:0] count;
  logic wrap, t_ev_ovf, t_m_ovf, t_m_valid;
  logic [LT_W-1:0] t_ev, t_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gtu_timing_gen u_tg (.clk, .rst_n, .gtu_clk_o(gtu_clk), .gtu_tick_o(gtu_tick),
                       .tick_dead_o(tick_dead), .tick_live_o(tick_live));
  gtu_counter u_cnt (.clk, .rst_n, .gtu_tick_i(gtu_tick), .sync_i(sync),
                     .count_o(count), .wrap_o(wrap));
  live_dead_counter u_ld (.clk, .rst_n, .tick_dead_i(tick_dead), .tick_live_i(tick_live),
                          .event_i(ev), .dead_i(dead), .t_ev_o(t_ev), .t_ev_ovf_o(t_ev_ovf),
                          .t_m_o(t_m), .t_m_ovf_o(t_m_ovf), .t_m_valid_o(t_m_valid));

  initial begin
    repeat (420_000) #10_000;   // 420 million clocks
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++; $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  // wait n clocks from one falling edge to another: long stretches as delays
  // ending half a clock early, then synchronised to the falling edge
  task automatic wait_clocks(input int n);
    if (n >= 1000) begin
      repeat (n / 1000 - 1) #10_000;
      #9_995;
      @(negedge clk);
    end
    repeat (n % 1000) @(negedge clk);
  endtask

  // one event interval: live for live_cyc clocks, then an event and a dead
  // period of dead_cyc clocks
  task automatic interval(input int live_cyc, input int dead_cyc, input bit check_gtu);
    wait_clocks(live_cyc);
    if (check_gtu) begin
      near("GTU count after the interval", int'(count), live_cyc / (SYS / 400_000), 3);
      checks++;
      if (wrap) begin failures++; $display("GTU counter wrapped"); end
    end
    ev = 1'b1; dead = 1'b1;
    @(negedge clk) ev = 1'b0;
    near("live time t_ev", int'(t_ev), live_cyc / (SYS / 3125), 1);
    checks++;
    if (t_ev_ovf) begin failures++; $display("live time overflow"); end
    wait_clocks(dead_cyc - 1);
    dead = 1'b0;
    wait (t_m_valid);
    near("dead time t_m", int'(t_m), dead_cyc / (SYS / 100_000), 1);
    checks++;
    if (t_m_ovf) begin failures++; $display("dead time overflow"); end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Time-sync: held over one GTU edge
    wait (gtu_tick);
    @(negedge clk) sync = 1'b1;
    repeat (SYS / 400_000) @(negedge clk);
    sync = 1'b0;
    // count is now 0 and GTU edges start counting; the live counter has been
    // running since reset, restart its interval with a first event
    ev = 1'b1;
    @(negedge clk) ev = 1'b0;
    interval(10 * SYS, SYS / 50, 1'b1);     // 0.1 Hz: 10 s live, 20 ms dead
    $display("GTU counter at end %0d", count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
