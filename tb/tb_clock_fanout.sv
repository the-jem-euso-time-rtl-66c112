// tb_clock_fanout: 18 lines, GTU clock of 20 clocks (10 high), Time-sync
// raised for some GTU periods, line enables changed at random times, also
// while the GTU clock is high. Checks on every line that each GTU pulse seen
// is a full 10 clocks long (no runt pulse), that a line enabled through a
// whole GTU period carries it one clock late, that a disabled line stays low,
// and that Time-sync follows the same mask.
module tb_clock_fanout;
  localparam int N = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gclk = 1'b0, tsync = 1'b0;
  logic [N-1:0] en = '0, go, so, act;
  int checks = 0, failures = 0;
  int len [N];
  logic [N-1:0] go_q = '0;
  logic [N-1:0] en_hist [4];
  int cyc = 0, toggles_high = 0;

  always #5 clk = ~clk;

  clock_fanout #(.N(N)) dut (.clk, .rst_n, .gtu_clk_i(gclk), .time_sync_i(tsync), .en_i(en),
                             .gtu_clk_o(go), .time_sync_o(so), .active_o(act));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  always @(negedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    gclk  <= ((cyc + 1) % 20) < 10;
    if ((cyc + 1) % 20 == 0) tsync <= ($urandom_range(0, 3) == 0);
    if ($urandom_range(0, 25) == 0) begin
      en <= en ^ (N'(1) << $urandom_range(0, N - 1));
      if (((cyc + 1) % 20) < 10) toggles_high <= toggles_high + 1;
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int i = 0; i < N; i++) begin
      if (go[i]) len[i]++;
      else if (go_q[i]) begin
        checks++;
        if (len[i] != 10) begin failures++; $display("line %0d pulse %0d", i, len[i]); end
        len[i] = 0;
      end
    end
    go_q = go;
  end

  // enables as seen in the last clock of each low GTU phase
  logic [N-1:0] en_low;
  always @(posedge clk) if (!gclk) en_low <= en;

  // every GTU rising edge: line enabled all the time through the previous
  // low phase carries the pulse; line disabled through it does not
  initial begin
    for (int i = 0; i < N; i++) len[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 1000; p++) begin
      logic [N-1:0] en_at_rise;
      @(posedge gclk);
      en_at_rise = en_low;
      @(posedge clk); #1;
      @(posedge clk); #1;
      checks++;
      if (go !== act) begin
        failures++; $display("go %h act %h", go, act);
      end
      checks++;
      if (act !== en_at_rise) begin failures++; $display("act %h en %h", act, en_at_rise); end
      checks++;
      if (so !== ({N{tsync}} & act)) begin failures++; $display("so %h", so); end
    end
    checks++;
    if (toggles_high < 10) begin failures++; $display("few enable changes while high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
