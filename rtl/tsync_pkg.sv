// tsync_pkg: widths and record types shared by the clock/time-synchronisation
// logic of the focal-surface electronics.
//
// The GTU (gate time unit) is one period of the 400 kHz GTU clock, 2.5 us.
// GTU counters are 24 bits wide, which at a 0.1 Hz trigger rate cannot wrap
// between two triggers (2^24 GTU = 41.9 s). Live- and dead-time counters are
// 18 bits. Time of day is kept as seconds of the UTC day (17 bits) plus the
// number of GTU edges since the last second mark (19 bits, up to 400 000).
// The record layouts below are this design's own choice.
package tsync_pkg;

  localparam int GTU_W    = 24;  // GTU counters on CLK board and CCBs
  localparam int LT_W     = 18;  // live/dead time counters
  localparam int SOD_W    = 17;  // seconds of day, 0..86399
  localparam int SUBSEC_W = 19;  // GTU edges since the second mark
  localparam int CAL_W    = 27;  // system clocks between two PPS edges
  localparam int EVN_W    = 32;  // event number

  localparam int SECONDS_PER_DAY = 86400;

  // Source of the time of day used for the stamp.
  typedef enum logic {
    SRC_GPS = 1'b0,   // GPS PPS + NMEA UTC
    SRC_ISS = 1'b1    // ISS/JEM time, used when PPS is lost
  } time_src_e;

  // Absolute time stamp of an event.
  typedef struct packed {
    logic [SOD_W-1:0]    sod;        // UTC second of day
    logic [SUBSEC_W-1:0] gtu_in_sec; // GTU edges since that second began
    time_src_e           src;        // where the second came from
    logic                confirmed;  // second confirmed by a received UTC
  } time_stamp_t;

  // Data kept from the last accepted GGA sentence (BCD digits).
  typedef struct packed {
    logic [23:0]  utc_bcd;   // hhmmss
    logic [SOD_W-1:0] utc_sod; // same time as seconds of day
    logic [15:0]  lat_int;   // ddmm
    logic [15:0]  lat_frac;  // first four decimals of minutes
    logic         lat_south; // 1 = 'S'
    logic [19:0]  lon_int;   // dddmm
    logic [15:0]  lon_frac;
    logic         lon_west;  // 1 = 'W'
    logic [3:0]   fix;       // fix quality digit
    logic [7:0]   sats;      // number of satellites, two BCD digits
  } gps_info_t;

  // Event record sent to the IDAQ board for every L2 trigger.
  typedef struct packed {
    logic [EVN_W-1:0] evt_num;   // event number since reset
    logic [GTU_W-1:0] gtu_count; // CLK-board GTU counter at the trigger
    time_stamp_t      ts;        // absolute time
    logic [LT_W-1:0]  t_ev;      // live time before this event, 3.125 kHz units
    logic             t_ev_ovf;
    logic [LT_W-1:0]  t_m_prev;  // dead time of the previous event, 100 kHz units
    logic             t_m_ovf;
  } event_rec_t;

  // Header field added by a CCB to each PDM data block.
  typedef struct packed {
    logic [GTU_W-1:0] trig_gtu;  // GTU number of the L1 trigger
    logic [GTU_W-1:0] first_gtu; // GTU number of the first sample in the block
    logic [7:0]       n_gtu;     // number of GTUs transferred
    logic [7:0]       trig_pos;  // position of the trigger GTU in the block
    logic [7:0]       step;      // sampling step in GTUs (1 = consecutive)
  } ccb_hdr_t;

endpackage
