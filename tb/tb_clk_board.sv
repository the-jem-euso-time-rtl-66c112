// tb_clk_board: the CLK board with time scaled by 100 (system clock 400 kHz,
// GTU 4 kHz, so the GTU is still 100 system clocks; UART 16 clocks per bit).
// A GPS model gives PPS and a GGA sentence 0.3 s later; an IDAQ model
// answers each trigger with busy. Checked: Time-sync clears the GTU counter
// and appears on the lines; the GGA data are stored and confirm the UTC
// second; two events with L2 triggers on two CCB lines one GTU apart give
// records with the right pattern, GTU counts, UTC second, GTUs in the second,
// live time and dead time (within one count, from the clocks the testbench
// counts); a GPS command byte leaves on the UART.
module tb_clk_board;
  import tsync_pkg::*;
  import tb_nmea_pkg::*;
  localparam int N = 18, SYS = 400_000, GTU = 4000, BAUD = 25_000, CPB = SYS / BAUD;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_sync = 1'b0, force_iss = 1'b0, busy = 1'b0, ack = 1'b0;
  logic [N-1:0] fan_en = '1, l2 = '0;
  logic [15:0] win = 16'd150;
  logic [N-1:0] gtu_lines, sync_lines, fan_act, pattern;
  logic [GTU_W-1:0] gtu_count, l2_gtu [N];
  logic gtu_wrap, sync_pend, trig, evt_valid, overrun, t_m_valid, t_m_ovf, bto;
  event_rec_t evt;
  logic [LT_W-1:0] t_m;
  logic [15:0] lost;
  logic pps, rxd, txd, cmd_rdy, info_valid, cks_err, ferr, gps_ok, gate, calv;
  logic [7:0] cmd_d = '0;
  logic cmd_v = 1'b0;
  gps_info_t info;
  time_stamp_t now;
  logic [CAL_W-1:0] cal;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  gps_model #(.CLKS_PER_BIT(CPB)) u_gps (.clk, .pps, .txd(rxd));

  clk_board #(.N_CCB(N), .SYS_HZ(SYS), .GTU_HZ(GTU), .BAUD(BAUD)) dut (
    .clk, .rst_n, .cmd_time_sync_i(cmd_sync), .fanout_en_i(fan_en), .trig_window_i(win),
    .force_iss_i(force_iss), .sync_after_dead_i(1'b0), .gtu_clk_o(gtu_lines), .time_sync_o(sync_lines),
    .gtu_count_o(gtu_count), .gtu_wrap_o(gtu_wrap), .sync_pending_o(sync_pend),
    .fanout_active_o(fan_act), .l2_trig_i(l2), .trig_idaq_o(trig), .busy_idaq_i(busy),
    .evt_o(evt), .evt_pattern_o(pattern), .evt_l2_gtu_o(l2_gtu), .evt_valid_o(evt_valid),
    .evt_ack_i(ack), .evt_overrun_o(overrun), .t_m_o(t_m), .t_m_ovf_o(t_m_ovf),
    .t_m_valid_o(t_m_valid), .lost_trig_o(lost), .busy_timeout_o(bto),
    .gps_pps_i(pps), .gps_rxd_i(rxd), .gps_txd_o(txd), .gps_cmd_data_i(cmd_d),
    .gps_cmd_valid_i(cmd_v), .gps_cmd_ready_o(cmd_rdy), .gps_info_o(info),
    .gps_info_valid_o(info_valid), .gps_cks_err_o(cks_err), .gps_frame_err_o(ferr),
    .iss_sec_i(1'b0), .iss_sod_i('0), .now_o(now), .gps_ok_o(gps_ok), .pps_gate_o(gate),
    .cal_o(cal), .cal_valid_o(calv));

  // receiver for the GPS command line
  logic [7:0] cmd_rx;
  logic cmd_rx_v, cmd_rx_err;
  uart_rx #(.CLKS_PER_BIT(CPB)) u_cmd_rx (.clk, .rst_n, .rxd_i(txd), .data_o(cmd_rx),
                                          .valid_o(cmd_rx_v), .frame_err_o(cmd_rx_err));
  logic [7:0] cmd_got [$];
  always @(posedge clk) if (rst_n && cmd_rx_v) cmd_got.push_back(cmd_rx);

  // IDAQ model: busy 10 clocks after the trigger, for busy_len clocks
  int busy_len = 8000;
  int dead_start = 0, dead_cycles = 0;
  always @(posedge trig) begin
    dead_start = cyc;
    repeat (10) @(negedge clk);
    busy = 1'b1;
    repeat (busy_len) @(negedge clk);
    busy = 1'b0;
    dead_cycles = cyc - dead_start;
  end

  initial begin
    repeat (4 * SYS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_near(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++; $display("%s: %0d expected %0d +-%0d", what, got, exp, tol);
    end
  endtask

  int pps_cyc, live_from, ev_cyc;
  int sod0 = 3600 * 10 + 60 * 20 + 30;

  task automatic fire(input int a, input int b);
    // line a, then line b one GTU later, both inside the window
    @(negedge clk) l2[a] = 1'b1;
    ev_cyc = cyc;
    repeat (100) @(negedge clk);
    l2[b] = 1'b1;
    repeat (20) @(negedge clk);
    l2 = '0;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // Time-sync
    repeat (1234) @(negedge clk);
    cmd_sync = 1'b1;
    @(negedge clk) cmd_sync = 1'b0;
    wait (sync_lines == '1);
    checks++;
    if (gtu_lines != '1) begin failures++; $display("GTU lines not high with Time-sync"); end
    wait (sync_lines == '0);
    repeat (5) @(negedge clk);
    checks++;
    if (gtu_count != 0) begin failures++; $display("GTU counter %0d after Time-sync", gtu_count); end
    live_from = cyc;
    // GPS second: PPS, then the sentence 0.3 s later
    @(negedge clk) pps_cyc = cyc;
    u_gps.pps_pulse(100);
    repeat (3 * SYS / 10) @(negedge clk);
    u_gps.send(gga(sod0, 40, 511234, 1'b0, 14, 155678, 1'b0, 1, 8));
    repeat (20) @(negedge clk);
    checks++;
    if (info.utc_sod != SOD_W'(sod0) || info.sats != 8'h08 || info.lat_int != 16'h4051 ||
        info.lon_frac != 16'h5678 || !now.confirmed || now.sod != SOD_W'(sod0) || !gps_ok) begin
      failures++; $display("GPS data not taken: sod %0d sats %h conf %0d", info.utc_sod, info.sats, now.confirmed);
    end
    // event 1
    fire(3, 7);
    wait (evt_valid);
    @(negedge clk);
    checks++;
    if (pattern != (N'(1) << 3 | N'(1) << 7) || evt.evt_num != 0) begin
      failures++; $display("pattern %h evt %0d", pattern, evt.evt_num);
    end
    expect_near("GTU difference of the two lines", int'(GTU_W'(l2_gtu[7] - l2_gtu[3])), 1, 0);
    expect_near("GTU count at trigger", int'(evt.gtu_count), (ev_cyc - live_from) / 100, 2);
    expect_near("GTUs in second", int'(evt.ts.gtu_in_sec), (ev_cyc - pps_cyc) / 100, 2);
    checks++;
    if (evt.ts.sod != SOD_W'(sod0) || evt.ts.src != SRC_GPS) begin failures++; $display("stamp second %0d", evt.ts.sod); end
    expect_near("live time 1", int'(evt.t_ev), (ev_cyc - 5) / 12800, 1);
    @(negedge clk) ack = 1'b1;
    @(negedge clk) ack = 1'b0;
    wait (t_m_valid);
    expect_near("dead time 1", int'(t_m), dead_cycles / 400, 1);
    // a GPS command
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      cmd_d = 8'h41 + 8'(i);
      cmd_v = 1'b1;
      @(negedge clk);
      while (!cmd_rdy) @(negedge clk);
    end
    cmd_v = 1'b0;
    // event 2, 0.2 s after the end of the first dead time
    live_from = cyc;
    busy_len = 3000;
    repeat (SYS / 5) @(negedge clk);
    fire(12, 0);
    wait (evt_valid);
    @(negedge clk);
    checks++;
    if (evt.evt_num != 1 || pattern != (N'(1) << 12 | N'(1) << 0)) begin failures++; $display("event 2 pattern %h", pattern); end
    expect_near("live time 2", int'(evt.t_ev), (ev_cyc - live_from) / 12800, 1);
    checks++;
    if (evt.t_m_prev != t_m) begin failures++; $display("t_m_prev %0d t_m %0d", evt.t_m_prev, t_m); end
    wait (t_m_valid);
    expect_near("dead time 2", int'(t_m), dead_cycles / 400, 1);
    repeat (20 * CPB) @(negedge clk);
    checks++;
    if (cmd_got.size() != 5 || cmd_got[0] != 8'h41 || cmd_got[4] != 8'h45) begin
      failures++; $display("GPS command bytes received %0d", cmd_got.size());
      foreach (cmd_got[i]) $display("  %h", cmd_got[i]);
    end
    checks++;
    if (overrun || bto || lost != 0 || cks_err || ferr) begin failures++; $display("unexpected error flags"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
