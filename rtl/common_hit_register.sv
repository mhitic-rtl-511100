// common_hit_register: time of the last hit on the common channel.
//
// The common channel has the same sampling cells and transition detect as a
// measuring channel. On a period with a leading edge the register loads the
// 23-bit time {coarse count, leading-edge position} and sets `valid`; a later
// common hit overwrites it. `clear` drops `valid`. One-cycle load latency.
//
// The published MHITIC chip gives the register and its role as the start/stop reference;
// taking the leading edge of the common input is this design's own choice.
module common_hit_register
  import mhitic_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                hit,
  input  hit_code_t           code,
  input  logic [COARSE_W-1:0] coarse,
  output logic [TIME_W-1:0]   com_time,
  output logic                valid
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      com_time <= '0;
      valid    <= 1'b0;
    end else if (hit && code.lead_v) begin
      com_time <= {coarse, code.lead_pos};
      valid    <= 1'b1;
    end
  end
endmodule
