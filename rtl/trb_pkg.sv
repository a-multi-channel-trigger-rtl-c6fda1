// trb_pkg: constants and types shared by the trigger and acquisition firmware.
//
// The detector has two scintillator layers of four tiles, each tile read by
// two SiPMs: 16 channels, every one digitised by its own FPGA TDC. The TDC is
// a 512-tap carry delay line of which one tap in four is sampled by a 320 MHz
// clock, so a sample is a 128-bit thermometer code. These numbers follow the
// board description; the widths of the time stamps, the channel numbering and
// the event format are choices of this design.
`timescale 1ps/1ps
package trb_pkg;

  localparam int unsigned N_LAYERS        = 2;
  localparam int unsigned TILES_PER_LAYER = 4;
  localparam int unsigned SIPM_PER_TILE   = 2;
  localparam int unsigned N_CH            = N_LAYERS * TILES_PER_LAYER * SIPM_PER_TILE; // 16

  localparam int unsigned TDL_TAPS      = 512;                     // carry taps in the chain
  localparam int unsigned TDL_STEP      = 4;                       // one tap in four sampled
  localparam int unsigned N_TAPS        = TDL_TAPS / TDL_STEP;     // 128 sampled taps
  localparam int unsigned FINE_W        = $clog2(N_TAPS + 1);      // 8 bits: 0..128
  localparam int unsigned COARSE_W      = 32;                      // 320 MHz coarse counter

  // Edge time of one channel: coarse 320 MHz count at the sample that first
  // saw the edge, and the number of sampled taps the edge had crossed by then.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } tdc_time_t;

  // Latest leading and trailing edge seen by one channel.
  typedef struct packed {
    logic      lead_valid;
    tdc_time_t lead;
    logic      trail_valid;  // a trailing edge that followed 'lead'
    tdc_time_t trail;
  } tdc_rec_t;

  // GPS information extracted from the NMEA stream, as BCD digits.
  typedef struct packed {
    logic [23:0] utc_time;   // hhmmss
    logic [23:0] utc_date;   // ddmmyy (from the RMC sentences)
    logic [31:0] latitude;   // ddmm.mmmm without the point, 8 digits
    logic [7:0]  lat_hemi;   // ASCII 'N' or 'S'
    logic [35:0] longitude;  // dddmm.mmmm without the point, 9 digits
    logic [7:0]  lon_hemi;   // ASCII 'E' or 'W'
    logic        fix_valid;  // GGA fix quality > 0, or RMC status 'A'
  } gps_info_t;

  // Event sync word that opens every event record.
  localparam logic [15:0] EVENT_SYNC = 16'hEB90;

endpackage
