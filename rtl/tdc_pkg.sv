// tdc_pkg: widths, record types and frame encodings shared by the TDC blocks.
//
// A hit time is 26 bits: 13-bit coarse count (40 MHz periods, 25 ns), 5-bit
// medium count (1.28 GHz periods, 781.25 ps), 6-bit DLL tap (12.2 ps) and
// 2-bit resistive interpolation step (3.05 ps). 2^26 bins of 3.05 ps give the
// 204.8 us dynamic range. The field widths are those of the default 32-bit
// data frame; the 4-bit frame type codes other than the idle frame
// (4'b1101, payload 0x0D0D0D0) and the contents of headers, trailers and group
// separators are this design's own choice.
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int COARSE_W = 13;
  localparam int MED_W    = 5;
  localparam int DLL_W    = 6;
  localparam int RES_W    = 2;
  localparam int FINE_W   = DLL_W + RES_W;       // 8: 256 bins per 1.28 GHz cycle
  localparam int CNT_W    = COARSE_W + MED_W;    // 18: time counter
  localparam int TIME_W   = CNT_W + FINE_W;      // 26: full hit time
  localparam int NCH      = 64;
  localparam int GROUP_SZ = 16;                  // channel field is 4 bits
  localparam int NGROUP   = NCH / GROUP_SZ;      // 4 groups, one per port
  localparam int NPORT    = 4;

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [TIME_W-1:0] tdc_time_t;

  // One edge seen by the digitizer. edge_t: 0 leading, 1 trailing.
  typedef struct packed {
    logic      edge_t;
    tdc_time_t t;
  } hit_t;

  // One entry of the channel buffer. In leading+TOT mode t is the leading
  // time and tot the trailing minus leading time; otherwise tot is 0.
  typedef struct packed {
    logic      edge_t;
    tdc_time_t t;
    tdc_time_t tot;
  } chan_word_t;

  // A 32-bit frame with an end marker. eoe=1 items carry no frame: they close
  // one channel's (or one group's) part of an event.
  typedef struct packed {
    logic        eoe;
    logic [31:0] word;
  } item_t;

  localparam logic [3:0] T_HEADER1   = 4'b1000;
  localparam logic [3:0] T_HEADER2   = 4'b1001;
  localparam logic [3:0] T_TRAILER   = 4'b1010;
  localparam logic [3:0] T_SEPARATOR = 4'b1011;
  localparam logic [31:0] IDLE_FRAME = 32'hD0D0_D0D0;   // type 1101 + 0x0D0D0D0

  // Event information queued for the readout at each accepted trigger.
  typedef struct packed {
    logic [15:0] event_id;
    logic [11:0] bx_id;
    cnt_t        trig_time;
  } event_t;

  // Run-time configuration decoded from the configuration registers.
  typedef struct packed {
    logic        triggered;     // 1: trigger matching, 0: untriggered readout
    logic        relative;      // times relative to the trigger window start
    logic        tot_mode;      // 1: leading + TOT frames (format B)
    logic        tot_fmt19;     // 1: 19-bit leading / 8-bit TOT, 0: 16 / 11
    logic [2:0]  lead_shift;    // leading time LSBs dropped in format B
    logic [2:0]  tot_shift;     // TOT LSBs dropped in format B
    logic        lead_en;       // format A: record leading edges
    logic        trail_en;      // format A: record trailing edges
    logic        fine_mode;     // 1: 3 ps bins, 0: 12 ps bins
    logic        single_port;   // 1: all groups on port 0 with separators
    logic        two_headers;   // also send header 2 (trigger time)
    logic        trig_ch0;      // channel 0 leading edges are triggers
    cnt_t        latency;       // trigger latency, 1.28 GHz cycles
    cnt_t        window;        // match window, 1.28 GHz cycles
    logic [11:0] bx_max;        // BX-ID counter wraps after this value
    logic [1:0]  port_rate;     // byte rate 320 MHz >> port_rate
  } cfg_t;
endpackage
