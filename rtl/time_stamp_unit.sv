// time_stamp_unit: keeps the absolute time of day of the CLK board and stamps
// each event with it.
//
// Time is held as the UTC second of day (sod) plus the number of GTU edges
// since that second began (gtu_in_sec), i.e. with 2.5 us resolution. The
// second boundaries ("marks") come from the GPS PPS pulse. At each mark the
// second count is advanced by one (a prediction, flagged unconfirmed) and a
// gate of GATE_CYC clocks is opened; the first UTC time delivered by the NMEA
// parser inside the gate, which arrives a few hundred ms after the PPS and is
// taken to name the second that PPS began, replaces the prediction and marks
// the second confirmed. UTC values outside the gate are ignored.
// If no PPS arrives for PPS_TIMEOUT clocks, GPS is declared lost and the marks
// and the second of day come from the ISS/JEM time input instead, until the
// next PPS edge, which is again a mark (a 1 Hz
// strobe iss_sec_i with the second of day iss_sod_i); force_iss_i selects ISS
// time by hand. The number of system clocks between consecutive PPS edges is
// reported on cal_o for calibrating the board oscillator against GPS.
// capture_i copies the current time to ts_o in the next clock.
// The PPS gate, the GPS/ISS fall-back and the calibration follow the
// document; the gate length, the timeout and the ISS time format are this
// design's choices. pps_i and iss_sec_i are synchronised (two flops), so
// marks take effect 3 clocks after the input edge.
module time_stamp_unit
  import tsync_pkg::*;
#(
  parameter int unsigned SYS_HZ      = 40_000_000,
  parameter int unsigned GATE_CYC    = SYS_HZ / 10 * 9,
  parameter int unsigned PPS_TIMEOUT = SYS_HZ / 2 * 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pps_i,
  input  logic              gtu_tick_i,
  input  logic [SOD_W-1:0]  gps_sod_i,
  input  logic              gps_valid_i,
  input  logic              iss_sec_i,
  input  logic [SOD_W-1:0]  iss_sod_i,
  input  logic              force_iss_i,
  input  logic              capture_i,
  output time_stamp_t       ts_o,
  output time_stamp_t       now_o,
  output logic              gps_ok_o,
  output logic              gate_o,
  output logic [CAL_W-1:0]  cal_o,
  output logic              cal_valid_o
);

  localparam int PW = $clog2(PPS_TIMEOUT + 1) > CAL_W ? $clog2(PPS_TIMEOUT + 1) : CAL_W;
  localparam int GW = $clog2(GATE_CYC + 1);

  logic pps_s1, pps_s2, pps_q, pps_edge;
  logic iss_s1, iss_s2, iss_q, iss_edge;
  logic [PW-1:0] since_pps;
  logic [GW-1:0] gate_cnt;
  logic [SOD_W-1:0] sod;
  logic [SUBSEC_W-1:0] sub;
  logic confirmed;
  time_src_e src;
  logic mark_gps, mark_iss;

  assign pps_edge = pps_s2 && !pps_q;
  assign iss_edge = iss_s2 && !iss_q;
  assign src      = (force_iss_i || !gps_ok_o) ? SRC_ISS : SRC_GPS;
  // A PPS edge marks the second unless ISS time is forced (and itself shows
  // that GPS is alive); the ISS strobe marks it only while GPS is not used.
  assign mark_gps = pps_edge && !force_iss_i;
  assign mark_iss = iss_edge && src == SRC_ISS && !mark_gps;
  assign now_o    = '{sod: sod, gtu_in_sec: sub, src: src, confirmed: confirmed};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pps_s1 <= 1'b0; pps_s2 <= 1'b0; pps_q <= 1'b0;
      iss_s1 <= 1'b0; iss_s2 <= 1'b0; iss_q <= 1'b0;
      since_pps <= '0; gps_ok_o <= 1'b0;
      gate_o <= 1'b0; gate_cnt <= '0;
      sod <= '0; sub <= '0; confirmed <= 1'b0;
      cal_o <= '0; cal_valid_o <= 1'b0;
      ts_o <= '0;
    end else begin
      pps_s1 <= pps_i;     pps_s2 <= pps_s1;     pps_q <= pps_s2;
      iss_s1 <= iss_sec_i; iss_s2 <= iss_s1;     iss_q <= iss_s2;
      cal_valid_o <= 1'b0;

      // PPS watchdog and oscillator calibration
      if (pps_edge) begin
        if (gps_ok_o) begin
          cal_o       <= CAL_W'(since_pps + 1'b1);
          cal_valid_o <= 1'b1;
        end
        since_pps <= '0;
        gps_ok_o  <= 1'b1;
      end else if (since_pps >= PW'(PPS_TIMEOUT - 1)) begin
        gps_ok_o <= 1'b0;
      end else begin
        since_pps <= since_pps + 1'b1;
      end

      // second of day and GTUs inside the second
      if (mark_gps) begin
        sub       <= '0;
        sod       <= (sod >= SOD_W'(SECONDS_PER_DAY - 1)) ? '0 : sod + 1'b1;
        confirmed <= 1'b0;
        gate_o    <= 1'b1;
        gate_cnt  <= '0;
      end else if (mark_iss) begin
        sub       <= '0;
        sod       <= iss_sod_i;
        confirmed <= 1'b1;
        gate_o    <= 1'b0;
      end else begin
        if (gtu_tick_i && !(&sub)) sub <= sub + 1'b1;
        if (gate_o) begin
          gate_cnt <= gate_cnt + 1'b1;
          if (gps_valid_i && src == SRC_GPS) begin
            sod       <= gps_sod_i;
            confirmed <= 1'b1;
            gate_o    <= 1'b0;
          end else if (gate_cnt == GW'(GATE_CYC - 1)) begin
            gate_o <= 1'b0;
          end
        end
      end

      if (capture_i) ts_o <= now_o;
    end
  end

endmodule
