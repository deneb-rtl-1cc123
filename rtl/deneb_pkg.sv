// deneb_pkg: constants and event-word layouts shared by the DENEB digital logic.
//
// Every pixel event produces a 64-bit timing word and, in timing+charge mode, a
// 64-bit charge word. The 64-bit width and the one-or-two-word split follow the
// chip description; the field layout below is this design's own choice.
//
// Timing word (type bit 63 = 0):
//   [62:53] pixel address {column[4:0], row[4:0]}
//   [52:37] coarse time of the low-threshold TDC stop edge
//   [36:29] fine code of the low-threshold crossing (time of arrival)
//   [28:21] fine code of the high-threshold crossing (slew rate), 0 if none
//   [20:13] coarse stop-edge difference high minus low threshold, 0xFF if none
//   [12:0]  time over threshold, clock cycles (saturating)
// Charge word (type bit 63 = 1):
//   [62:53] pixel address, [52:37] same coarse time as the timing word,
//   [36:21] charge-branch pulse count, [20:8] event window length in cycles,
//   [7] charge overflow, [6] ToT overflow, [5] merged packets, [4:0] zero.
package deneb_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int WORD_W   = 64;
  localparam int ROW_W    = 5;
  localparam int COL_W    = 5;
  localparam int ADDR_W   = ROW_W + COL_W;
  localparam int COARSE_W = 16;
  localparam int FINE_W   = 8;
  localparam int TOT_W    = 13;
  localparam int CHG_W    = 16;
  localparam int WIN_W    = 13;
  localparam int DCO_W    = 8;
  localparam int CFG_W    = 32;
  localparam int N_TDC    = 4;

  typedef logic [WORD_W-1:0] word_t;

  // Link frame headers (2 bits before each 64-bit payload).
  localparam logic [1:0] HDR_DATA = 2'b01;
  localparam logic [1:0] HDR_IDLE = 2'b10;

  typedef struct packed {
    logic                 is_charge;  // 0
    logic [ADDR_W-1:0]    addr;
    logic [COARSE_W-1:0]  coarse;
    logic [FINE_W-1:0]    fine_lo;
    logic [FINE_W-1:0]    fine_hi;
    logic [DCO_W-1:0]     dcoarse_hi;
    logic [TOT_W-1:0]     tot;
  } timing_word_t;

  typedef struct packed {
    logic                 is_charge;  // 1
    logic [ADDR_W-1:0]    addr;
    logic [COARSE_W-1:0]  coarse;
    logic [CHG_W-1:0]     charge;
    logic [WIN_W-1:0]     win_len;
    logic                 chg_ovf;
    logic                 tot_ovf;
    logic                 merged;
    logic [4:0]           zero;
  } charge_word_t;

  // Per-pixel 32-bit configuration register.
  typedef struct packed {
    logic [10:0] analog_trim;  // [31:21] to threshold/calibration DACs
    logic [7:0]  holdoff;      // [20:13] veto window after each event, cycles
    logic [7:0]  ext;          // [12:5]  event-window extension, cycles
    logic        cryo;         // [4]     low-temperature bias mode (analog)
    logic        force_en;     // [3]     inject the test strobe
    logic        charge_en;    // [2]     charge branch enabled
    logic        pgate;        // [1]     analog power gating
    logic        enable;       // [0]     pixel enabled (not masked)
  } pix_cfg_t;

  // Global 32-bit configuration register (TMR protected).
  typedef struct packed {
    logic [24:0] spare;        // [31:7]
    logic [2:0]  link_sel;     // [6:4] active links = 32 >> link_sel (0..5)
    logic        ddr;          // [3]   DDR (2 bits/clock) instead of SDR
    logic        timing_only;  // [2]   suppress charge words
    logic        run;          // [1]   readout running
    logic        spare0;       // [0]
  } glob_cfg_t;

  // Per-column periphery configuration register.
  typedef struct packed {
    logic [22:0] spare;        // [31:9]
    logic [7:0]  dll_trim;     // [8:1] delay trim for the skew-correction DLL
    logic        col_en;       // [0]   column enabled (clock veto when 0)
  } col_cfg_t;
endpackage
