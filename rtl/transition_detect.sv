// transition_detect: finds and encodes the edges in one period's sample word.
//
// Bit i of `word` is the input sampled at phase i of the period. Extended with
// the last sample of the previous period (kept in a register), a 0->1 step
// between phase i-1 and phase i is a leading edge at position i, a 1->0 step a
// trailing edge. Only the first leading and the first trailing edge of a period
// are kept, which sets the double-hit resolution to one clock period (16 bins).
// `edge_sel` masks the edge types to record. The result is packed into the
// 10-bit hit code (valid + 4-bit position for each edge type) and `hit` tells
// the storage logic to write it; detection is combinational, `hit`/`code`
// belong to the word of the same cycle.
//
// The published MHITIC chip gives the job (detect, classify leading/trailing, encode in the
// fewest bits, store only on a hit) and the 10-bit width; the code layout and
// the first-edge rule are this design's own.
module transition_detect
  import mhitic_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [NTAP-1:0] word,
  input  edge_sel_e       edge_sel,
  output logic            hit,
  output hit_code_t       code
);
  timeunit 1ps; timeprecision 1ps;

  logic            prev_last;   // phase NTAP-1 sample of the previous period
  logic [NTAP-1:0] prior;      // sample preceding each phase
  logic [NTAP-1:0] lead, trail;

  always_ff @(posedge clk) begin
    if (rst) prev_last <= 1'b0;
    else     prev_last <= word[NTAP-1];
  end

  assign prior = {word[NTAP-2:0], prev_last};
  assign lead   =  word & ~prior;
  assign trail  = ~word &  prior;

  always_comb begin
    code = '0;
    // scan from the top so the lowest (earliest) position wins
    for (int i = NTAP - 1; i >= 0; i--) begin
      if (lead[i]) begin
        code.lead_v   = 1'b1;
        code.lead_pos = FINE_W'(i);
      end
      if (trail[i]) begin
        code.trail_v   = 1'b1;
        code.trail_pos = FINE_W'(i);
      end
    end
    if (!edge_sel[0]) begin code.lead_v  = 1'b0; code.lead_pos  = '0; end
    if (!edge_sel[1]) begin code.trail_v = 1'b0; code.trail_pos = '0; end
    hit = code.lead_v | code.trail_v;
  end
endmodule
