// clk_board: logic of the clock and time-synchronisation board (CLK board) of
// the focal-surface electronics.
//
// From the 40 MHz system clock the board makes the 400 kHz GTU clock and the
// slow ticks of the live/dead-time counters (gtu_timing_gen), and fans the
// GTU clock and the Time-sync signal out to the N_CCB cluster control boards
// (clock_fanout). A Time-sync command (cmd_time_sync_i) clears the board's
// own 24-bit GTU counter and, through the Time-sync lines, those of all CCBs
// at the same GTU edge (time_sync_ctrl, gtu_counter). With sync_after_dead_i
// set, the same happens by itself at the end of each dead time, i.e. after
// the data transfer to the IDAQ/CPU.
// The L2 trigger lines of the CCBs enter l2_trigger_unit, which records the
// trigger pattern and the GTU count of each line, sends the trigger to the
// IDAQ board and follows its busy reply. The GPS module is read through a
// UART (uart_rx, nmea_parser): its PPS opens a gate in which the UTC time is
// taken (time_stamp_unit), with the ISS/JEM time as fall-back. Commands to the
// GPS module leave through uart_tx. live_dead_counter measures the dead time
// of each event and the live time between events.
// One clock after each trigger an event record (event number, GTU count,
// time stamp, live time before the event, dead time of the previous event,
// trigger pattern and per-CCB GTU counts) is placed on evt_o, and evt_valid_o
// stays high until evt_ack_i; a record not taken before the next event is
// overwritten and evt_overrun_o is set. The record layout and its handshake
// stand in for the serial IDAQ link, whose protocol is not part of this
// design.
module clk_board
  import tsync_pkg::*;
#(
  parameter int unsigned N_CCB        = 18,
  parameter int unsigned SYS_HZ       = 40_000_000,
  parameter int unsigned GTU_HZ       = 400_000,
  parameter int unsigned BAUD         = 4800,
  parameter int unsigned TRIG_LEN     = 4,
  parameter int unsigned BUSY_TIMEOUT = SYS_HZ / 1000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control (from the CPU through the IDAQ link)
  input  logic                 cmd_time_sync_i,
  input  logic                 sync_after_dead_i,
  input  logic [N_CCB-1:0]     fanout_en_i,
  input  logic [15:0]          trig_window_i,
  input  logic                 force_iss_i,
  // clock distribution
  output logic [N_CCB-1:0]     gtu_clk_o,
  output logic [N_CCB-1:0]     time_sync_o,
  output logic [GTU_W-1:0]     gtu_count_o,
  output logic                 gtu_wrap_o,
  output logic                 sync_pending_o,
  output logic [N_CCB-1:0]     fanout_active_o,
  // triggers and IDAQ
  input  logic [N_CCB-1:0]     l2_trig_i,
  output logic                 trig_idaq_o,
  input  logic                 busy_idaq_i,
  output event_rec_t           evt_o,
  output logic [N_CCB-1:0]     evt_pattern_o,
  output logic [GTU_W-1:0]     evt_l2_gtu_o [N_CCB],
  output logic                 evt_valid_o,
  input  logic                 evt_ack_i,
  output logic                 evt_overrun_o,
  output logic [LT_W-1:0]      t_m_o,
  output logic                 t_m_ovf_o,
  output logic                 t_m_valid_o,
  output logic [15:0]          lost_trig_o,
  output logic                 busy_timeout_o,
  // GPS
  input  logic                 gps_pps_i,
  input  logic                 gps_rxd_i,
  output logic                 gps_txd_o,
  input  logic [7:0]           gps_cmd_data_i,
  input  logic                 gps_cmd_valid_i,
  output logic                 gps_cmd_ready_o,
  output gps_info_t            gps_info_o,
  output logic                 gps_info_valid_o,
  output logic                 gps_cks_err_o,
  output logic                 gps_frame_err_o,
  // ISS/JEM time
  input  logic                 iss_sec_i,
  input  logic [SOD_W-1:0]     iss_sod_i,
  // time status
  output time_stamp_t          now_o,
  output logic                 gps_ok_o,
  output logic                 pps_gate_o,
  output logic [CAL_W-1:0]     cal_o,
  output logic                 cal_valid_o
);

  localparam int unsigned DIV_GTU      = SYS_HZ / GTU_HZ;
  localparam int unsigned CLKS_PER_BIT = SYS_HZ / BAUD;

  logic gtu_clk, gtu_tick, tick_dead, tick_live;
  logic time_sync, sync_req;

  // Time-sync on command, or (when enabled) each time the IDAQ busy ends,
  // so that acquisition restarts from GTU zero after every data transfer
  assign sync_req = cmd_time_sync_i | (sync_after_dead_i & t_m_valid_o);

  gtu_timing_gen #(.DIV_GTU(DIV_GTU), .DIV_DEAD(4), .DIV_LIVE(128)) u_timing (
    .clk, .rst_n, .gtu_clk_o(gtu_clk), .gtu_tick_o(gtu_tick),
    .tick_dead_o(tick_dead), .tick_live_o(tick_live)
  );

  time_sync_ctrl u_tsync (
    .clk, .rst_n, .sync_req_i(sync_req), .gtu_tick_i(gtu_tick),
    .time_sync_o(time_sync), .pending_o(sync_pending_o)
  );

  gtu_counter #(.W(GTU_W)) u_gtu_cnt (
    .clk, .rst_n, .gtu_tick_i(gtu_tick), .sync_i(time_sync),
    .count_o(gtu_count_o), .wrap_o(gtu_wrap_o)
  );

  clock_fanout #(.N(N_CCB)) u_fanout (
    .clk, .rst_n, .gtu_clk_i(gtu_clk), .time_sync_i(time_sync), .en_i(fanout_en_i),
    .gtu_clk_o, .time_sync_o, .active_o(fanout_active_o)
  );

  logic             event_s, dead;
  logic [N_CCB-1:0] pattern;
  logic [GTU_W-1:0] l2_gtu [N_CCB];

  l2_trigger_unit #(.N(N_CCB), .GTU_W(GTU_W), .TRIG_LEN(TRIG_LEN),
                    .BUSY_TIMEOUT(BUSY_TIMEOUT)) u_l2 (
    .clk, .rst_n, .l2_i(l2_trig_i), .gtu_count_i(gtu_count_o), .win_len_i(trig_window_i),
    .busy_i(busy_idaq_i), .trig_o(trig_idaq_o), .event_o(event_s), .dead_o(dead),
    .pattern_o(pattern), .l2_gtu_o(l2_gtu), .lost_o(lost_trig_o),
    .busy_timeout_o(busy_timeout_o)
  );

  logic [LT_W-1:0] t_ev;
  logic            t_ev_ovf;
  live_dead_counter #(.W(LT_W)) u_ldc (
    .clk, .rst_n, .tick_dead_i(tick_dead), .tick_live_i(tick_live),
    .event_i(event_s), .dead_i(dead),
    .t_ev_o(t_ev), .t_ev_ovf_o(t_ev_ovf),
    .t_m_o, .t_m_ovf_o, .t_m_valid_o
  );

  logic [7:0] rx_byte;
  logic       rx_valid;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd_i(gps_rxd_i), .data_o(rx_byte), .valid_o(rx_valid),
    .frame_err_o(gps_frame_err_o)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data_i(gps_cmd_data_i), .valid_i(gps_cmd_valid_i),
    .ready_o(gps_cmd_ready_o), .txd_o(gps_txd_o)
  );

  nmea_parser u_nmea (
    .clk, .rst_n, .byte_i(rx_byte), .byte_valid_i(rx_valid),
    .info_o(gps_info_o), .info_valid_o(gps_info_valid_o), .cks_err_o(gps_cks_err_o)
  );

  time_stamp_t ts;
  time_stamp_unit #(.SYS_HZ(SYS_HZ)) u_ts (
    .clk, .rst_n, .pps_i(gps_pps_i), .gtu_tick_i(gtu_tick),
    .gps_sod_i(gps_info_o.utc_sod), .gps_valid_i(gps_info_valid_o),
    .iss_sec_i, .iss_sod_i, .force_iss_i, .capture_i(event_s),
    .ts_o(ts), .now_o, .gps_ok_o, .gate_o(pps_gate_o), .cal_o, .cal_valid_o
  );

  // Event record: built one clock after the trigger, when the time stamp and
  // the live time of this event have been captured.
  logic             build;
  logic [GTU_W-1:0] gtu_at_evt;
  logic [EVN_W-1:0] evt_num;
  logic [LT_W-1:0]  t_m_last;
  logic             t_m_last_ovf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      build <= 1'b0; gtu_at_evt <= '0; evt_num <= '0;
      t_m_last <= '0; t_m_last_ovf <= 1'b0;
      evt_o <= '0; evt_pattern_o <= '0; evt_valid_o <= 1'b0; evt_overrun_o <= 1'b0;
      for (int i = 0; i < int'(N_CCB); i++) evt_l2_gtu_o[i] <= '0;
    end else begin
      build <= event_s;
      if (event_s) gtu_at_evt <= gtu_count_o;
      if (t_m_valid_o) begin
        t_m_last     <= t_m_o;
        t_m_last_ovf <= t_m_ovf_o;
      end
      if (evt_valid_o && evt_ack_i) evt_valid_o <= 1'b0;
      if (build) begin
        evt_o.evt_num   <= evt_num;
        evt_o.gtu_count <= gtu_at_evt;
        evt_o.ts        <= ts;
        evt_o.t_ev      <= t_ev;
        evt_o.t_ev_ovf  <= t_ev_ovf;
        evt_o.t_m_prev  <= t_m_last;
        evt_o.t_m_ovf   <= t_m_last_ovf;
        evt_pattern_o   <= pattern;
        evt_l2_gtu_o    <= l2_gtu;
        evt_valid_o     <= 1'b1;
        evt_num         <= evt_num + 1'b1;
        if (evt_valid_o && !evt_ack_i) evt_overrun_o <= 1'b1;
      end
    end
  end

endmodule
