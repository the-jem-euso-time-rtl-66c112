// tsync_system: the time-synchronisation system of the focal-surface
// electronics, i.e. the CLK board together with the GTU time keeping of each
// of the N_CCB cluster control boards (CCBs).
//
// The CLK board fans out its GTU clock and Time-sync signal to every CCB; each
// CCB runs its own GTU counter from them, so that after a Time-sync command
// all counters hold the same GTU number (the CCB copies lag the CLK board by
// a few system clocks of line and synchroniser delay). A CCB tags each PDM
// data block (an L1 trigger, l1_trig_i) with its GTU number in a header; the
// CCBs' L2 trigger lines (l2_trig_i, produced by CCB trigger logic outside
// this design) go back to the CLK board, which stamps the event with the
// CLK-board GTU count, UTC time from GPS (or ISS/JEM time), live and dead
// time, and hands it to the IDAQ side on evt_o.
// All boards share the 40 MHz system clock, as in the baseline distribution
// scheme; the CCB header configuration is common to all CCBs here.
module tsync_system
  import tsync_pkg::*;
#(
  parameter int unsigned N_CCB  = 18,
  parameter int unsigned SYS_HZ = 40_000_000,
  parameter int unsigned GTU_HZ = 400_000,
  parameter int unsigned BAUD   = 4800
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 cmd_time_sync_i,
  input  logic                 sync_after_dead_i,
  input  logic [N_CCB-1:0]     fanout_en_i,
  input  logic [15:0]          trig_window_i,
  input  logic                 force_iss_i,
  input  logic [7:0]           cfg_n_gtu_i,
  input  logic [7:0]           cfg_trig_pos_i,
  input  logic [7:0]           cfg_step_i,
  // CCB side
  input  logic [N_CCB-1:0]     l1_trig_i,
  output ccb_hdr_t             ccb_hdr_o [N_CCB],
  output logic [N_CCB-1:0]     ccb_hdr_valid_o,
  output logic [GTU_W-1:0]     ccb_count_o [N_CCB],
  output logic [N_CCB-1:0]     ccb_wrap_o,
  input  logic [N_CCB-1:0]     l2_trig_i,
  // CLK board status
  output logic [GTU_W-1:0]     gtu_count_o,
  output logic                 gtu_wrap_o,
  output logic                 sync_pending_o,
  output logic [N_CCB-1:0]     fanout_active_o,
  // IDAQ
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

  logic [N_CCB-1:0] gtu_line, sync_line;

  clk_board #(.N_CCB(N_CCB), .SYS_HZ(SYS_HZ), .GTU_HZ(GTU_HZ), .BAUD(BAUD)) u_clk_board (
    .clk, .rst_n,
    .cmd_time_sync_i, .sync_after_dead_i, .fanout_en_i, .trig_window_i, .force_iss_i,
    .gtu_clk_o(gtu_line), .time_sync_o(sync_line), .gtu_count_o, .gtu_wrap_o,
    .sync_pending_o, .fanout_active_o,
    .l2_trig_i, .trig_idaq_o, .busy_idaq_i, .evt_o, .evt_pattern_o, .evt_l2_gtu_o,
    .evt_valid_o, .evt_ack_i, .evt_overrun_o, .t_m_o, .t_m_ovf_o, .t_m_valid_o,
    .lost_trig_o, .busy_timeout_o,
    .gps_pps_i, .gps_rxd_i, .gps_txd_o, .gps_cmd_data_i, .gps_cmd_valid_i,
    .gps_cmd_ready_o, .gps_info_o, .gps_info_valid_o, .gps_cks_err_o, .gps_frame_err_o,
    .iss_sec_i, .iss_sod_i,
    .now_o, .gps_ok_o, .pps_gate_o, .cal_o, .cal_valid_o
  );

  for (genvar i = 0; i < int'(N_CCB); i++) begin : g_ccb
    ccb_gtu_tagger u_ccb (
      .clk, .rst_n,
      .gtu_clk_i(gtu_line[i]), .time_sync_i(sync_line[i]), .l1_i(l1_trig_i[i]),
      .cfg_n_gtu_i, .cfg_trig_pos_i, .cfg_step_i,
      .hdr_o(ccb_hdr_o[i]), .hdr_valid_o(ccb_hdr_valid_o[i]),
      .count_o(ccb_count_o[i]), .wrap_o(ccb_wrap_o[i])
    );
  end

endmodule
