// data_processor: turns a stored channel entry into measured times.
//
// Each edge present in the entry gives the absolute time {coarse, position}.
// With the processor enabled this is taken relative to the common hit: in
// common-start mode hit - common, in common-stop mode common - hit, both modulo
// 2^23. With it disabled the absolute time passes unchanged (used to measure
// the delay line alone). Purely combinational.
//
// The subtraction, the mode-dependent sign and the enable follow the published MHITIC chip;
// the modulo-2^23 wrap-around is this design's own.
module data_processor
  import mhitic_pkg::*;
(
  input  ram_entry_t        entry,
  input  logic [TIME_W-1:0] com_time,
  input  logic              enable,
  input  logic              common_stop,
  output logic              lead_v,
  output logic [TIME_W-1:0] lead_time,
  output logic              trail_v,
  output logic [TIME_W-1:0] trail_time
);
  timeunit 1ps; timeprecision 1ps;

  function automatic logic [TIME_W-1:0] relate(input logic [TIME_W-1:0] t_abs,
                                               input logic [TIME_W-1:0] t_com,
                                               input logic en, input logic stop);
    if (!en)       return t_abs;
    else if (stop) return t_com - t_abs;
    else           return t_abs - t_com;
  endfunction

  assign lead_v     = entry.code.lead_v;
  assign trail_v    = entry.code.trail_v;
  assign lead_time  = relate({entry.coarse, entry.code.lead_pos},  com_time, enable, common_stop);
  assign trail_time = relate({entry.coarse, entry.code.trail_pos}, com_time, enable, common_stop);
endmodule
