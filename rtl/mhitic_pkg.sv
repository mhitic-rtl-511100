// mhitic_pkg: types and constants shared by the multi-hit TDC.
//
// The chip measures time in bins of one delay-line stage. A hit time is 23 bits:
// the 19-bit coarse counter (one count per reference-clock period) above the
// 4-bit position of the edge among the 16 delay-line phases. The 10-bit hit code
// written per clock period is this design's own packing: a valid bit and a 4-bit
// position for the first leading edge and for the first trailing edge.
package mhitic_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NCH      = 8;   // measuring channels
  localparam int unsigned NTAP     = 16;  // delay-line stages = samples per period
  localparam int unsigned FINE_W   = 4;   // log2(NTAP)
  localparam int unsigned COARSE_W = 19;  // coarse counter width
  localparam int unsigned TIME_W   = COARSE_W + FINE_W;  // 23-bit dynamic range
  localparam int unsigned CODE_W   = 10;  // encoded hit code per period
  localparam int unsigned CH_W     = 3;   // channel number width

  // Which edges are recorded.
  typedef enum logic [1:0] {
    EDGE_NONE     = 2'b00,
    EDGE_LEADING  = 2'b01,
    EDGE_TRAILING = 2'b10,
    EDGE_BOTH     = 2'b11
  } edge_sel_e;

  // Hit code of one clock period on one channel (10 bits).
  typedef struct packed {
    logic              lead_v;
    logic              trail_v;
    logic [FINE_W-1:0] lead_pos;
    logic [FINE_W-1:0] trail_pos;
  } hit_code_t;

  // One channel-RAM entry: coarse count of the period plus its hit code.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    hit_code_t           code;
  } ram_entry_t;

  // One read-out word: channel, edge type (1 = trailing) and time.
  typedef struct packed {
    logic [CH_W-1:0]   channel;
    logic              trailing;
    logic [TIME_W-1:0] time_val;
  } out_word_t;

  localparam int unsigned OUT_W = $bits(out_word_t);  // 27
endpackage
