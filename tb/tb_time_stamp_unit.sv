// tb_time_stamp_unit: time scaled so that one second is 2000 clocks (gate
// 1800 clocks, PPS timeout 3000 clocks) and a GTU edge comes every 5 clocks.
// Scenario: PPS every second with the UTC time delivered 600 clocks later;
// events captured before and after the UTC arrives; a UTC that disagrees with
// the prediction; a UTC delivered after the gate closed (ignored); a PPS
// period of 2003 clocks (calibration value); loss of PPS (switch to ISS
// time); PPS back (its first edge is a second mark again); ISS forced by hand. The GTU count inside the second is
// checked against a counter in the testbench cleared 3 clocks after each
// second-mark input edge.
module tb_time_stamp_unit;
  import tsync_pkg::*;
  localparam int SEC = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pps = 1'b0, tick = 1'b0, gv = 1'b0, iss = 1'b0, force_iss = 1'b0, cap = 1'b0;
  logic [SOD_W-1:0] gsod = '0, isod = '0;
  time_stamp_t ts, now;
  logic gps_ok, gate, calv;
  logic [CAL_W-1:0] cal;
  int checks = 0, failures = 0;
  int cyc = 0, sub_ref = 0, n_cal = 0;
  logic m1 = 0, m2 = 0, m3 = 0;      // reference delay of the active mark source
  logic use_iss = 1'b1;

  always #5 clk = ~clk;

  time_stamp_unit #(.SYS_HZ(SEC), .GATE_CYC(SEC / 10 * 9), .PPS_TIMEOUT(SEC / 2 * 3)) dut (
    .clk, .rst_n, .pps_i(pps), .gtu_tick_i(tick), .gps_sod_i(gsod), .gps_valid_i(gv),
    .iss_sec_i(iss), .iss_sod_i(isod), .force_iss_i(force_iss), .capture_i(cap),
    .ts_o(ts), .now_o(now), .gps_ok_o(gps_ok), .gate_o(gate), .cal_o(cal), .cal_valid_o(calv));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tick <= (cyc % 5 == 4);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    m1 <= use_iss ? iss : pps; m2 <= m1; m3 <= m2;
    if (m2 && !m3) sub_ref <= 0;
    else if (tick) sub_ref <= sub_ref + 1;
    if (rst_n && calv) n_cal++;
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    repeat (20) @(negedge clk);
    sig = 1'b0;
  endtask

  task automatic capture(input logic [SOD_W-1:0] sod, input time_src_e src, input bit conf, input string what);
    int sr;
    @(negedge clk) cap = 1'b1;
    @(posedge clk) sr = sub_ref;
    @(negedge clk) cap = 1'b0;
    checks++;
    if (ts.sod !== sod || ts.src !== src || ts.confirmed !== conf || int'(ts.gtu_in_sec) != sr) begin
      failures++;
      $display("%s: sod %0d src %0d conf %0d sub %0d; exp %0d %0d %0d %0d", what, ts.sod, ts.src,
               ts.confirmed, ts.gtu_in_sec, sod, src, conf, sr);
    end
  endtask

  task automatic utc(input int sod);
    @(negedge clk) begin gsod = SOD_W'(sod); gv = 1'b1; end
    @(negedge clk) gv = 1'b0;
  endtask

  // one GPS second starting now: PPS, event before UTC, UTC, event after
  task automatic gps_second(input int period, input int pred, input int given, input bit late);
    fork
      pulse(pps);
      begin
        repeat (100) @(negedge clk);
        capture(SOD_W'(pred), SRC_GPS, 1'b0, "before UTC");
        repeat (500) @(negedge clk);
        utc(given);
        repeat (200) @(negedge clk);
        capture(SOD_W'(given), SRC_GPS, 1'b1, "after UTC");
        if (late) begin
          repeat (1100) @(negedge clk);   // past the 1800-clock gate
          utc(given + 7);
          capture(SOD_W'(given), SRC_GPS, 1'b1, "late UTC ignored");
        end
      end
    join_none
    repeat (period) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (gps_ok) begin failures++; $display("gps_ok after reset"); end
    use_iss = 1'b0;
    gps_second(SEC, 1, 43200, 1'b0);       // prediction 1, GPS says 12:00:00
    checks++;
    if (!gps_ok) begin failures++; $display("gps_ok not set by PPS"); end
    gps_second(SEC, 43201, 43201, 1'b1);
    gps_second(SEC + 3, 43202, 43202, 1'b0);
    gps_second(SEC, 43203, 86399, 1'b0);   // jump to the last second of the day
    checks++;
    if (cal !== CAL_W'(SEC + 3)) begin failures++; $display("cal %0d exp %0d", cal, SEC + 3); end
    gps_second(SEC, 0, 0, 1'b0);           // day wraps
    checks++;
    if (cal !== CAL_W'(SEC)) begin failures++; $display("cal %0d exp %0d", cal, SEC); end
    // PPS lost: after 1.5 s the ISS time takes over
    repeat (SEC + SEC / 2) @(negedge clk);
    checks++;
    if (gps_ok) begin failures++; $display("gps_ok still set"); end
    use_iss = 1'b1;
    for (int k = 0; k < 3; k++) begin
      isod = SOD_W'(5000 + k);
      pulse(iss);
      repeat (300) @(negedge clk);
      capture(SOD_W'(5000 + k), SRC_ISS, 1'b1, "ISS time");
      repeat (SEC - 321) @(negedge clk);
    end
    // PPS back: the first PPS marks the second again
    use_iss = 1'b0;
    gps_second(SEC, 5003, 5003, 1'b0);
    // forced ISS time
    force_iss = 1'b1;
    use_iss = 1'b1;
    isod = SOD_W'(777);
    pulse(iss);
    repeat (50) @(negedge clk);
    capture(SOD_W'(777), SRC_ISS, 1'b1, "forced ISS");
    checks++;
    if (n_cal < 4) begin failures++; $display("calibration strobes %0d", n_cal); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
