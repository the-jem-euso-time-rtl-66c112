// tb_time_sync_ctrl: GTU edges every 10 clocks; Time-sync requests at random
// times, some during a running pulse. Checks that each request gives exactly
// one Time-sync pulse, that it starts in the clock after the first GTU edge
// following the request (or after the running pulse), and that it lasts one
// GTU period (10 clocks).
module tb_time_sync_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, tick = 1'b0, ts, pend;
  int checks = 0, failures = 0;
  int cyc = 0, reqs = 0, pulses = 0, len = 0;
  int exp_start = -1;   // cycle at which the next pulse must start
  bit ts_q = 1'b0;

  always #5 clk = ~clk;

  time_sync_ctrl dut (.clk, .rst_n, .sync_req_i(req), .gtu_tick_i(tick),
                      .time_sync_o(ts), .pending_o(pend));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GTU edge strobe every 10 clocks, at cycles where cyc % 10 == 0.
  always @(negedge clk) begin
    tick <= (cyc % 10 == 9);
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
  end

  // Monitor: pulse length and start cycle.
  always @(negedge clk) if (rst_n) begin
    if (ts && !ts_q) begin
      pulses++;
      checks++;
      if (exp_start >= 0 && cyc != exp_start) begin
        failures++; $display("pulse at %0d expected %0d", cyc, exp_start);
      end
      len = 1;
    end else if (ts) len++;
    else if (ts_q) begin
      checks++;
      if (len != 10) begin failures++; $display("pulse length %0d", len); end
    end
    ts_q = ts;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      int gap;
      gap = 30 + int'($urandom_range(0, 40));
      repeat (gap) @(negedge clk);
      // next GTU edge strobe is seen at the posedge ending cycle c with c%10==9;
      // the pulse is visible from cycle c+1
      exp_start = ((cyc / 10) * 10 + 9) + 1;
      if (cyc % 10 == 9) exp_start = cyc + 11;  // request together with the edge: next edge
      req = 1'b1; reqs++;
      @(negedge clk) req = 1'b0;
      // sometimes a second request while the pulse runs
      if (k % 5 == 4) begin
        wait (ts);
        repeat (3) @(negedge clk);
        req = 1'b1; reqs++;
        @(negedge clk) req = 1'b0;
        exp_start = -1;
        wait (!ts);
        @(negedge clk);
        wait (ts);
        checks++;
        if (cyc % 10 != 0) begin failures++; $display("queued pulse not GTU aligned %0d", cyc); end
      end
      // every request must be served within two GTUs
      begin
        int w;
        w = 0;
        while ((ts || pend || pulses < reqs) && w < 40) begin @(negedge clk); w++; end
        checks++;
        if (w >= 40) begin failures++; $display("request %0d not served", k); end
        wait (!ts && !pend);
        @(negedge clk);
      end
    end
    repeat (30) @(negedge clk);
    checks++;
    if (pulses != reqs) begin failures++; $display("pulses %0d requests %0d", pulses, reqs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
