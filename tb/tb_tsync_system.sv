// tb_tsync_system: end-to-end run of the whole time-synchronisation system,
// 18 CCBs, with time scaled by 100 (system clock 400 kHz, GTU 4 kHz = 100
// system clocks, UART 16 clocks per bit, busy timeout 400 clocks). Models of
// the GPS module and the IDAQ board drive it. Every mechanism of the design
// is made to happen and counted; one that never happens is a failure:
//   Time-sync and CCB counter alignment, a masked fan-out line, L1 headers
//   with sampling steps 1/10/100, multi-CCB L2 patterns, L2 triggers lost in
//   dead time, busy timeout, UTC confirmed inside the PPS gate, a sentence
//   with a bad checksum, oscillator calibration, GPS loss and ISS fall-back,
//   record overrun, a GPS command, live/dead time measurement.
module tb_tsync_system;
  import tsync_pkg::*;
  import tb_nmea_pkg::*;
  localparam int N = 18, SYS = 400_000, GTU = 4000, BAUD = 25_000, CPB = SYS / BAUD;
  localparam int SEC = SYS, G = SYS / GTU;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_sync = 1'b0, force_iss = 1'b0, busy = 1'b0, ack = 1'b0;
  logic [N-1:0] fan_en = '1, l1 = '0, l2 = '0;
  logic [15:0] win = 16'd250;
  logic [7:0] n_gtu = 8'd128, tpos = 8'd64, step = 8'd1;
  ccb_hdr_t hdr [N];
  logic [N-1:0] hdr_v, ccb_wrap, fan_act, pattern;
  logic [GTU_W-1:0] ccb_cnt [N], l2_gtu [N], gtu_count;
  logic gtu_wrap, sync_pend, trig, evt_valid, overrun, t_m_valid, t_m_ovf, bto;
  event_rec_t evt;
  logic [LT_W-1:0] t_m;
  logic [15:0] lost;
  logic pps, rxd, txd, cmd_rdy, info_valid, cks_err, ferr, gps_ok, gate, calv;
  logic [7:0] cmd_d = '0;
  logic cmd_v = 1'b0;
  logic iss = 1'b0;
  logic auto_sync = 1'b0;
  logic [SOD_W-1:0] iss_sod = '0;
  gps_info_t info;
  time_stamp_t now;
  logic [CAL_W-1:0] cal;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int m_sync = 0, m_align = 0, m_mask = 0, m_hdr1 = 0, m_hdr10 = 0, m_hdr100 = 0;
  int m_multi = 0, m_lost = 0, m_bto = 0, m_confirm = 0, m_cks = 0, m_cal = 0;
  int m_iss = 0, m_overrun = 0, m_cmd = 0, m_livedead = 0, m_auto = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  gps_model #(.CLKS_PER_BIT(CPB)) u_gps (.clk, .pps, .txd(rxd));

  tsync_system #(.N_CCB(N), .SYS_HZ(SYS), .GTU_HZ(GTU), .BAUD(BAUD)) dut (
    .clk, .rst_n, .cmd_time_sync_i(cmd_sync), .fanout_en_i(fan_en), .trig_window_i(win),
    .force_iss_i(force_iss), .sync_after_dead_i(auto_sync), .cfg_n_gtu_i(n_gtu), .cfg_trig_pos_i(tpos), .cfg_step_i(step),
    .l1_trig_i(l1), .ccb_hdr_o(hdr), .ccb_hdr_valid_o(hdr_v), .ccb_count_o(ccb_cnt),
    .ccb_wrap_o(ccb_wrap), .l2_trig_i(l2),
    .gtu_count_o(gtu_count), .gtu_wrap_o(gtu_wrap), .sync_pending_o(sync_pend),
    .fanout_active_o(fan_act), .trig_idaq_o(trig), .busy_idaq_i(busy),
    .evt_o(evt), .evt_pattern_o(pattern), .evt_l2_gtu_o(l2_gtu), .evt_valid_o(evt_valid),
    .evt_ack_i(ack), .evt_overrun_o(overrun), .t_m_o(t_m), .t_m_ovf_o(t_m_ovf),
    .t_m_valid_o(t_m_valid), .lost_trig_o(lost), .busy_timeout_o(bto),
    .gps_pps_i(pps), .gps_rxd_i(rxd), .gps_txd_o(txd), .gps_cmd_data_i(cmd_d),
    .gps_cmd_valid_i(cmd_v), .gps_cmd_ready_o(cmd_rdy), .gps_info_o(info),
    .gps_info_valid_o(info_valid), .gps_cks_err_o(cks_err), .gps_frame_err_o(ferr),
    .iss_sec_i(iss), .iss_sod_i(iss_sod), .now_o(now), .gps_ok_o(gps_ok), .pps_gate_o(gate),
    .cal_o(cal), .cal_valid_o(calv));

  // GPS command line receiver
  logic [7:0] cmd_rx;
  logic cmd_rx_v, cmd_rx_err;
  uart_rx #(.CLKS_PER_BIT(CPB)) u_cmd_rx (.clk, .rst_n, .rxd_i(txd), .data_o(cmd_rx),
                                          .valid_o(cmd_rx_v), .frame_err_o(cmd_rx_err));

  always @(posedge clk) if (rst_n) begin
    if (cmd_rx_v && cmd_rx == 8'h24) m_cmd <= m_cmd + 1;
    if (cks_err) m_cks <= m_cks + 1;
    if (calv) begin
      m_cal <= m_cal + 1;
      checks <= checks + 1;
      if (cal != CAL_W'(SEC)) begin failures <= failures + 1; $display("cal %0d", cal); end
    end
  end

  // IDAQ model: answers a trigger with busy unless told not to
  bit answer = 1'b1;
  int busy_len = 4000;
  always @(posedge trig) if (answer) begin
    repeat (20) @(negedge clk);
    busy = 1'b1;
    repeat (busy_len) @(negedge clk);
    busy = 1'b0;
  end

  initial begin
    repeat (8 * SEC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // wait for the middle of a GTU on the CLK board (counter stable everywhere)
  task automatic mid_gtu();
    logic [GTU_W-1:0] c;
    c = gtu_count;
    wait (gtu_count != c);
    repeat (G / 2) @(negedge clk);
  endtask

  task automatic do_sync();
    @(negedge clk) cmd_sync = 1'b1;
    @(negedge clk) cmd_sync = 1'b0;
    // pending drops when the pulse starts; the counter loads zero at the
    // GTU edge that sees it, so it must read zero within two GTUs
    wait (sync_pend == 1'b0);
    repeat (2 * G) begin
      @(negedge clk);
      if (gtu_count == 0) break;
    end
    chk(gtu_count == 0, "CLK board GTU counter cleared");
    repeat (G / 2) @(negedge clk);
    m_sync++;
  endtask

  task automatic check_align(input logic [N-1:0] lines);
    mid_gtu();
    for (int i = 0; i < N; i++) if (lines[i]) begin
      chk(ccb_cnt[i] == gtu_count, $sformatf("CCB %0d count %0d board %0d", i, ccb_cnt[i], gtu_count));
    end
    m_align++;
  endtask

  // L1 on CCB i with a given step: header must match the CCB's count
  task automatic l1_header(input int i, input int st);
    logic [GTU_W-1:0] c;
    mid_gtu();
    step = 8'(st); tpos = 8'($urandom_range(0, 100)); n_gtu = 8'($urandom_range(16, 255));
    c = gtu_count;
    l1[i] = 1'b1;
    wait (hdr_v[i]);
    @(negedge clk) l1[i] = 1'b0;
    chk(hdr[i].trig_gtu == c && hdr[i].first_gtu == c - GTU_W'(tpos) * GTU_W'(step) &&
        hdr[i].step == step && hdr[i].n_gtu == n_gtu && hdr[i].trig_pos == tpos,
        $sformatf("header CCB %0d step %0d", i, st));
    if (st == 1) m_hdr1++; else if (st == 10) m_hdr10++; else m_hdr100++;
  endtask

  // an event with L2 on the given lines (one GTU apart); returns after the record
  task automatic event_l2(input logic [N-1:0] lines, input bit take, input time_src_e src,
                          input logic [SOD_W-1:0] sod, input bit conf, input bit extra_l2);
    int first = -1;
    logic [GTU_W-1:0] c0;
    mid_gtu();
    c0 = gtu_count;
    for (int i = 0; i < N; i++) if (lines[i]) begin
      l2[i] = 1'b1;
      if (first < 0) first = i;
      if ($countones(lines) > 1) repeat (G) @(negedge clk);
    end
    wait (evt_valid && !ack);
    @(negedge clk);
    chk(pattern == lines, $sformatf("pattern %h exp %h", pattern, lines));
    chk(l2_gtu[first] == c0, "GTU latch of first line");
    chk(evt.ts.src == src && evt.ts.sod == sod && evt.ts.confirmed == conf,
        $sformatf("stamp src %0d sod %0d conf %0d, exp %0d %0d %0d", evt.ts.src, evt.ts.sod,
                  evt.ts.confirmed, src, sod, conf));
    if ($countones(lines) > 1) m_multi++;
    l2 = '0;
    if (extra_l2) begin
      int n_before;
      n_before = int'(lost);
      repeat (200) @(negedge clk);
      l2[N - 1] = 1'b1;
      repeat (10) @(negedge clk);
      l2[N - 1] = 1'b0;
      repeat (5) @(negedge clk);
      chk(int'(lost) == n_before + 1, "L2 during dead time counted as lost");
      m_lost++;
    end
    if (take) begin
      ack = 1'b1;
      @(negedge clk) ack = 1'b0;
    end
    if (answer) begin
      wait (t_m_valid);
      chk(int'(t_m) >= busy_len / 400 && int'(t_m) <= busy_len / 400 + 1,
          $sformatf("dead time %0d for busy %0d clocks", t_m, busy_len));
      m_livedead++;
    end else begin
      repeat (500) @(negedge clk);
      chk(bto, "busy timeout flagged");
      m_bto++;
    end
    repeat (50) @(negedge clk);
  endtask

  int sod0 = 12 * 3600;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) @(negedge clk);
    do_sync();
    check_align('1);
    // mask line 17 for a while: its CCB stops counting
    fan_en[17] = 1'b0;
    repeat (10 * G) @(negedge clk);
    mid_gtu();
    chk(ccb_cnt[17] < gtu_count - 5, "masked line stops its CCB counter");
    m_mask++;
    fan_en[17] = 1'b1;
    repeat (3 * G) @(negedge clk);
    do_sync();
    check_align('1);
    // GPS second 1: PPS, then GGA 0.3 s later
    fork u_gps.pps_pulse(100); join_none
    repeat (SEC * 3 / 10) @(negedge clk);
    u_gps.send(gga(sod0, 40, 511234, 1'b0, 14, 155678, 1'b0, 1, 9));
    repeat (10) @(negedge clk);
    chk(now.confirmed && now.sod == SOD_W'(sod0), "UTC confirmed inside the gate");
    m_confirm++;
    // L1 headers
    l1_header(0, 1); l1_header(5, 10); l1_header(11, 100); l1_header(17, 1);
    // event 1: two CCBs, a late L2 during dead time
    event_l2(N'(1) << 2 | N'(1) << 5, 1'b1, SRC_GPS, SOD_W'(sod0), 1'b1, 1'b1);
    // a GPS command, "$PSRF"
    @(negedge clk);
    foreach (cmd_str[i]) begin
      cmd_d = cmd_str[i]; cmd_v = 1'b1;
      @(negedge clk);
      while (!cmd_rdy) @(negedge clk);
    end
    cmd_v = 1'b0;
    // GPS second 2 with a corrupted sentence: stays predicted, unconfirmed
    wait (cyc >= 2 * SEC);   // PPS period: second PPS one second after the first
    fork u_gps.pps_pulse(100); join_none
    repeat (SEC * 3 / 10) @(negedge clk);
    u_gps.send(gga(sod0 + 1, 40, 511234, 1'b0, 14, 155678, 1'b0, 1, 9, 1'b1));
    // event 2: no busy reply -> timeout
    answer = 1'b0;
    event_l2(N'(1) << 8, 1'b1, SRC_GPS, SOD_W'(sod0 + 1), 1'b0, 1'b0);
    answer = 1'b1;
    // events 3 and 4: record 3 not taken -> overrun
    event_l2(N'(1) << 1, 1'b0, SRC_GPS, SOD_W'(sod0 + 1), 1'b0, 1'b0);
    event_l2(N'(1) << 3 | N'(1) << 4 | N'(1) << 13, 1'b1, SRC_GPS, SOD_W'(sod0 + 1), 1'b0, 1'b0);
    chk(overrun, "overrun flagged");
    m_overrun++;
    // GPS second 3 (good), then PPS stops
    wait (cyc >= 3 * SEC);
    fork u_gps.pps_pulse(100); join_none
    repeat (SEC * 3 / 10) @(negedge clk);
    u_gps.send(gga(sod0 + 2, 40, 511234, 1'b0, 14, 155678, 1'b0, 1, 9));
    wait (cyc >= 4 * SEC + SEC * 6 / 10);
    chk(!gps_ok, "GPS declared lost");
    // ISS time takes over
    iss_sod = SOD_W'(sod0 + 5);
    @(negedge clk) iss = 1'b1;
    repeat (20) @(negedge clk) iss = 1'b0;
    event_l2(N'(1) << 6, 1'b1, SRC_ISS, SOD_W'(sod0 + 5), 1'b1, 1'b0);
    m_iss++;
    // automatic Time-sync at the end of the dead time
    auto_sync = 1'b1;
    mid_gtu();
    chk(gtu_count > 10, "counter running before automatic Time-sync");
    event_l2(N'(1) << 9, 1'b1, SRC_ISS, SOD_W'(sod0 + 5), 1'b1, 1'b0);
    repeat (3 * G) begin
      @(negedge clk);
      if (gtu_count == 0) break;
    end
    chk(gtu_count == 0, "automatic Time-sync after the dead time");
    check_align('1);
    m_auto++;
    auto_sync = 1'b0;
    repeat (100 * CPB) @(negedge clk);

    chk(m_sync >= 1,     "mechanism: Time-sync");
    chk(m_align >= 1,    "mechanism: CCB alignment");
    chk(m_mask >= 1,     "mechanism: fan-out mask");
    chk(m_hdr1 >= 1 && m_hdr10 >= 1 && m_hdr100 >= 1, "mechanism: L1 headers with steps");
    chk(m_multi >= 1,    "mechanism: multi-CCB pattern");
    chk(m_lost >= 1,     "mechanism: lost L2 in dead time");
    chk(m_bto >= 1,      "mechanism: busy timeout");
    chk(m_confirm >= 1,  "mechanism: UTC confirmed in gate");
    chk(m_cks >= 1,      "mechanism: checksum error");
    chk(m_cal >= 1,      "mechanism: calibration");
    chk(m_iss >= 1,      "mechanism: ISS fall-back");
    chk(m_overrun >= 1,  "mechanism: record overrun");
    chk(m_cmd >= 1,      "mechanism: GPS command");
    chk(m_livedead >= 1, "mechanism: live/dead time");
    chk(m_auto >= 1,     "mechanism: automatic Time-sync");
    $display("mechanisms: sync %0d align %0d mask %0d hdr %0d/%0d/%0d multi %0d lost %0d bto %0d confirm %0d cks %0d cal %0d iss %0d overrun %0d cmd %0d livedead %0d auto %0d",
             m_sync, m_align, m_mask, m_hdr1, m_hdr10, m_hdr100, m_multi, m_lost, m_bto,
             m_confirm, m_cks, m_cal, m_iss, m_overrun, m_cmd, m_livedead, m_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] cmd_str [5] = '{8'h24, 8'h50, 8'h53, 8'h52, 8'h46};
endmodule
