// tb_l2_trigger_unit: 18 L2 lines, a GTU count that advances every 20 clocks,
// an IDAQ model that raises busy a few clocks after the trigger and holds it
// for a random time. Each event raises a random set of lines at random GTUs
// inside the pattern window, plus lines after the window (which must count as
// lost, not enter the pattern). Checks per event: trigger delay (3 + window
// clocks after the first edge), pulse length, pattern, per-line GTU latch,
// dead level until busy ends, lost count. A last event gets no busy reply
// and must end by the busy timeout.
module tb_l2_trigger_unit;
  localparam int N = 18, TL = 4, BT = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] l2 = '0, pattern;
  logic [23:0] gtu = 24'd1000;
  logic [15:0] win;
  logic busy = 1'b0, trig, ev, dead, bto;
  logic [23:0] l2_gtu [N];
  logic [15:0] lost;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_lost = 0;
  int n_events = 0, n_multi = 0, n_lost_ev = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 20 == 19) gtu <= gtu + 1;
  end

  l2_trigger_unit #(.N(N), .TRIG_LEN(TL), .BUSY_TIMEOUT(BT)) dut (
    .clk, .rst_n, .l2_i(l2), .gtu_count_i(gtu), .win_len_i(win), .busy_i(busy),
    .trig_o(trig), .event_o(ev), .dead_o(dead), .pattern_o(pattern), .l2_gtu_o(l2_gtu),
    .lost_o(lost), .busy_timeout_o(bto));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait until just after a GTU count change, so that the 3-clock input delay
  // stays inside one GTU
  task automatic to_gtu_start();
    @(negedge clk);
    while (cyc % 20 != 0) @(negedge clk);
  endtask

  task automatic run_event(input int w, input bit reply);
    logic [N-1:0] exp_pat = '0;
    logic [23:0]  exp_gtu [N];
    int t0, ntr, first;
    for (int i = 0; i < N; i++) exp_gtu[i] = '0;
    win = 16'(w);
    to_gtu_start();
    first = int'($urandom_range(0, N - 1));
    l2[first] = 1'b1; exp_pat[first] = 1'b1; exp_gtu[first] = gtu;
    t0 = cyc;
    ntr = 0;
    // more lines inside the window, each at a GTU start
    fork
      begin
        while (cyc - t0 + 20 < w) begin
          repeat (20) @(negedge clk);
          if ($urandom_range(0, 1) == 1) begin
            int j = int'($urandom_range(0, N - 1));
            if (!exp_pat[j]) begin
              l2[j] = 1'b1; exp_pat[j] = 1'b1; exp_gtu[j] = gtu;
            end
          end
        end
      end
      begin
        wait (trig);
        ntr = cyc - t0;
        @(negedge clk);
      end
    join
    checks++;
    if (ntr != 3 + w) begin failures++; $display("trigger after %0d clocks, window %0d", ntr, w); end
    checks++;
    if (!ev) begin failures++; $display("no event strobe"); end
    // trigger pulse length
    for (int k = 0; k < TL; k++) begin
      checks++;
      if (!trig || !dead) begin failures++; $display("trigger pulse short"); end
      @(negedge clk);
    end
    checks++;
    if (trig) begin failures++; $display("trigger pulse long"); end
    checks++;
    if (pattern !== exp_pat) begin failures++; $display("pattern %h exp %h", pattern, exp_pat); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (l2_gtu[i] !== exp_gtu[i]) begin failures++; $display("line %0d gtu %0d exp %0d", i, l2_gtu[i], exp_gtu[i]); end
    end
    if ($countones(exp_pat) > 1) n_multi++;
    l2 = '0;
    if (reply) begin
      int blen = int'($urandom_range(20, 300));
      repeat (5) @(negedge clk);
      busy = 1'b1;
      // a late L2 trigger while dead is lost
      repeat (10) @(negedge clk);
      if ($urandom_range(0, 1) == 1) begin
        l2[0] = 1'b1; exp_lost++; n_lost_ev++;
        repeat (5) @(negedge clk);
        l2[0] = 1'b0;
      end
      repeat (blen) begin
        @(negedge clk);
        checks++;
        if (!dead) begin failures++; $display("dead dropped during busy"); end
      end
      busy = 1'b0;
      repeat (4) @(negedge clk);
      checks++;
      if (dead) begin failures++; $display("still dead after busy"); end
      checks++;
      if (int'(lost) != exp_lost) begin failures++; $display("lost %0d exp %0d", lost, exp_lost); end
    end else begin
      repeat (BT + 5) @(negedge clk);
      checks++;
      if (dead || !bto) begin failures++; $display("no busy timeout"); end
    end
    n_events++;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    win = 16'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (bto) begin failures++; $display("timeout flag set after reset"); end
    for (int k = 0; k < 40; k++)
      run_event((k % 4 == 0) ? 0 : int'($urandom_range(1, 120)), 1'b1);
    run_event(30, 1'b0);
    checks++;
    if (n_multi < 5 || n_lost_ev < 5) begin failures++; $display("multi %0d lost %0d", n_multi, n_lost_ev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
