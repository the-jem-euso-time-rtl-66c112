// tb_tsync_full: one complete operation of the time-synchronisation system
// at its real sizes and rates: 18 CCBs, 40 MHz system clock, 400 kHz GTU,
// GPS UART at 4800 baud. Sequence: Time-sync command, check that the CLK
// board and all CCB GTU counters agree; GPS PPS followed 0.3 s later by a GGA
// sentence, which must confirm the UTC second; an L1 trigger on one CCB
// (header check); L2 triggers from two CCBs one GTU apart; the IDAQ model
// holds busy for 20 ms. The event record is checked: pattern, GTU latches,
// UTC second and GTUs since PPS (2.5 us units), live time since the
// Time-sync (3.125 kHz units) and then the dead time (100 kHz units).
module tb_tsync_full;
  import tsync_pkg::*;
  import tb_nmea_pkg::*;
  localparam int N = 18, SYS = 40_000_000, G = 100, CPB = SYS / 4800;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_sync = 1'b0, busy = 1'b0, ack = 1'b0;
  logic [N-1:0] fan_en = '1, l1 = '0, l2 = '0;
  ccb_hdr_t hdr [N];
  logic [N-1:0] hdr_v, ccb_wrap, fan_act, pattern;
  logic [GTU_W-1:0] ccb_cnt [N], l2_gtu [N], gtu_count;
  logic gtu_wrap, sync_pend, trig, evt_valid, overrun, t_m_valid, t_m_ovf, bto;
  event_rec_t evt;
  logic [LT_W-1:0] t_m;
  logic [15:0] lost;
  logic pps, rxd, txd, cmd_rdy, info_valid, cks_err, ferr, gps_ok, gate, calv;
  gps_info_t info;
  time_stamp_t now;
  logic [CAL_W-1:0] cal;
  int checks = 0, failures = 0, cyc = 0;

  always #12.5 clk = ~clk;   // 40 MHz
  always @(posedge clk) cyc <= cyc + 1;

  gps_model #(.CLKS_PER_BIT(CPB)) u_gps (.clk, .pps, .txd(rxd));

  tsync_system dut (
    .clk, .rst_n, .cmd_time_sync_i(cmd_sync), .fanout_en_i(fan_en), .trig_window_i(16'd300),
    .force_iss_i(1'b0), .sync_after_dead_i(1'b0), .cfg_n_gtu_i(8'd128), .cfg_trig_pos_i(8'd64), .cfg_step_i(8'd1),
    .l1_trig_i(l1), .ccb_hdr_o(hdr), .ccb_hdr_valid_o(hdr_v), .ccb_count_o(ccb_cnt),
    .ccb_wrap_o(ccb_wrap), .l2_trig_i(l2),
    .gtu_count_o(gtu_count), .gtu_wrap_o(gtu_wrap), .sync_pending_o(sync_pend),
    .fanout_active_o(fan_act), .trig_idaq_o(trig), .busy_idaq_i(busy),
    .evt_o(evt), .evt_pattern_o(pattern), .evt_l2_gtu_o(l2_gtu), .evt_valid_o(evt_valid),
    .evt_ack_i(ack), .evt_overrun_o(overrun), .t_m_o(t_m), .t_m_ovf_o(t_m_ovf),
    .t_m_valid_o(t_m_valid), .lost_trig_o(lost), .busy_timeout_o(bto),
    .gps_pps_i(pps), .gps_rxd_i(rxd), .gps_txd_o(txd), .gps_cmd_data_i(8'h00),
    .gps_cmd_valid_i(1'b0), .gps_cmd_ready_o(cmd_rdy), .gps_info_o(info),
    .gps_info_valid_o(info_valid), .gps_cks_err_o(cks_err), .gps_frame_err_o(ferr),
    .iss_sec_i(1'b0), .iss_sod_i('0), .now_o(now), .gps_ok_o(gps_ok), .pps_gate_o(gate),
    .cal_o(cal), .cal_valid_o(calv));

  // IDAQ model: busy 20 clocks after the trigger, for 20 ms
  int busy_len = SYS / 50;
  always @(posedge trig) begin
    repeat (20) @(negedge clk);
    busy = 1'b1;
    repeat (busy_len) @(negedge clk);
    busy = 1'b0;
  end

  initial begin
    repeat (SYS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic mid_gtu();
    logic [GTU_W-1:0] c;
    c = gtu_count;
    wait (gtu_count != c);
    repeat (G / 2) @(negedge clk);
  endtask

  int sync_cyc, pps_cyc, ev_cyc;
  int sod0 = 23 * 3600 + 59 * 60 + 58;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (1000) @(negedge clk);
    // Time-sync
    cmd_sync = 1'b1;
    @(negedge clk) cmd_sync = 1'b0;
    wait (gtu_count == 0);
    sync_cyc = cyc;
    repeat (20 * G) @(negedge clk);
    mid_gtu();
    for (int i = 0; i < N; i++) chk(ccb_cnt[i] == gtu_count, $sformatf("CCB %0d aligned", i));
    // GPS: PPS, GGA 0.3 s later
    pps_cyc = cyc;
    fork u_gps.pps_pulse(SYS / 10000); join_none
    repeat (SYS * 3 / 10) @(negedge clk);
    u_gps.send(gga(sod0, 45, 123456, 1'b1, 120, 654321, 1'b1, 1, 11));
    repeat (10) @(negedge clk);
    chk(now.confirmed && now.sod == SOD_W'(sod0) && info.sats == 8'h11 && info.lat_south &&
        info.lon_west && info.lon_int == 20'h12065, "GPS data and UTC confirmed");
    // L1 on CCB 4
    mid_gtu();
    l1[4] = 1'b1;
    wait (hdr_v[4]);
    @(negedge clk) l1[4] = 1'b0;
    chk(hdr[4].trig_gtu == gtu_count && hdr[4].first_gtu == gtu_count - 64, "L1 header");
    // L2 from CCB 9 and, one GTU later, CCB 15
    mid_gtu();
    ev_cyc = cyc;
    l2[9] = 1'b1;
    repeat (G) @(negedge clk);
    l2[15] = 1'b1;
    wait (evt_valid);
    @(negedge clk);
    l2 = '0;
    chk(pattern == (N'(1) << 9 | N'(1) << 15), "pattern");
    chk(l2_gtu[15] == l2_gtu[9] + 1, "GTU latches one GTU apart");
    chk(evt.ts.sod == SOD_W'(sod0) && evt.ts.confirmed && evt.ts.src == SRC_GPS, "UTC second");
    chk(int'(evt.ts.gtu_in_sec) >= (ev_cyc - pps_cyc) / G - 1 && int'(evt.ts.gtu_in_sec) <= (ev_cyc - pps_cyc) / G + 4,
        $sformatf("GTUs since PPS %0d, expected about %0d", evt.ts.gtu_in_sec, (ev_cyc - pps_cyc) / G));
    chk(int'(evt.t_ev) >= (ev_cyc - 5) / 12800 - 1 && int'(evt.t_ev) <= (ev_cyc - 5) / 12800 + 1,
        $sformatf("live time %0d, expected about %0d", evt.t_ev, (ev_cyc - 5) / 12800));
    ack = 1'b1;
    @(negedge clk) ack = 1'b0;
    wait (t_m_valid);
    chk(int'(t_m) >= busy_len / 400 && int'(t_m) <= busy_len / 400 + 1,
        $sformatf("dead time %0d, expected about %0d", t_m, busy_len / 400));
    chk(!overrun && !bto && lost == 0 && !cks_err && !ferr, "no error flags");
    $display("simulated %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
