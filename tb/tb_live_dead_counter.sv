// tb_live_dead_counter: random dead-tick and live-tick strobes, events with
// random live gaps and dead periods. The testbench counts the strobes itself
// (live ticks outside dead periods, dead ticks inside) and compares t_ev at
// every event and t_m at the end of every dead period. A last phase keeps
// both counters running past 2^18 ticks to check saturation and overflow.
module tb_live_dead_counter;
  localparam int W = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic td = 1'b0, tl = 1'b0, ev = 1'b0, dead = 1'b0;
  logic [W-1:0] t_ev, t_m;
  logic t_ev_ovf, t_m_ovf, t_m_valid;
  int checks = 0, failures = 0;
  int ref_live = 0, ref_dead = 0, n_ev = 0, n_m = 0;
  int exp_m = 0;

  always #5 clk = ~clk;

  live_dead_counter dut (.clk, .rst_n, .tick_dead_i(td), .tick_live_i(tl), .event_i(ev), .dead_i(dead),
                         .t_ev_o(t_ev), .t_ev_ovf_o(t_ev_ovf), .t_m_o(t_m), .t_m_ovf_o(t_m_ovf),
                         .t_m_valid_o(t_m_valid));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit fast);
    td = fast ? 1'b1 : ($urandom_range(0, 2) == 0);
    tl = fast ? 1'b1 : ($urandom_range(0, 6) == 0);
    @(posedge clk);
    if (!ev && !dead && tl) ref_live++;
    if (dead && td) ref_dead++;
    @(negedge clk);
  endtask

  task automatic one_event(input int live_len, input int dead_len, input bit fast);
    repeat (live_len) step(fast);
    // event: trigger sent, dead starts in the same clock
    ev = 1'b1; dead = 1'b1;
    step(fast);
    ev = 1'b0;
    checks++;
    if (fast) begin
      if (!(t_ev_ovf && t_ev == '1)) begin failures++; $display("live overflow not flagged"); end
    end else if (t_ev !== W'(ref_live) || t_ev_ovf) begin
      failures++; $display("t_ev %0d exp %0d", t_ev, ref_live);
    end
    ref_live = 0; n_ev++;
    repeat (dead_len - 1) step(fast);
    dead = 1'b0;
    exp_m = ref_dead; ref_dead = 0;
    @(posedge clk); #1;
    checks++;
    if (!t_m_valid) begin failures++; $display("no t_m_valid"); end
    if (fast) begin
      if (!(t_m_ovf && t_m == '1)) begin failures++; $display("dead overflow not flagged"); end
    end else if (t_m !== W'(exp_m) || t_m_ovf) begin
      failures++; $display("t_m %0d exp %0d", t_m, exp_m);
    end
    n_m++;
    @(negedge clk);
    if (!dead && tl) ref_live++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++)
      one_event(int'($urandom_range(5, 900)), int'($urandom_range(3, 700)), 1'b0);
    // overflow of both counters
    one_event(1 << W, 1 << W, 1'b1);
    // and back to normal values
    one_event(300, 200, 1'b0);
    checks++;
    if (n_ev != 62 || n_m != 62) begin failures++; $display("events %0d %0d", n_ev, n_m); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
