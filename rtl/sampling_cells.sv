// sampling_cells: samples one input at the 16 delay-line phases.
//
// Flip-flop i captures the input on the rising edge of tap i, i.e. i stage
// delays after the reference clock edge, so the 16 flops together take a
// "photograph" of the input over one clock period. The word is handed to the
// reference-clock domain in two halves: samples 0..7 are copied on tap 8, when
// they are all settled and before flop 0 is overwritten, and samples 8..15 are
// copied directly on the next clock edge. The 16-bit word `word` therefore holds
// the samples of the previous clock period, bit i taken at phase i.
//
// Follows the published MHITIC chip in sampling the input with the delay-line clocks; the
// two-half hand-over into the clock domain is this design's own choice. Each
// flop has its own clock (a tap), as the sampling principle requires.
module sampling_cells #(
  parameter int unsigned NTAP = 16
) (
  input  logic            clk,      // reference clock (equal to taps[0])
  input  logic [NTAP-1:0] taps,     // delay-line phases
  input  logic            hit_in,   // asynchronous channel input
  output logic [NTAP-1:0] word      // samples of the previous period
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned HALF = NTAP / 2;

  logic [NTAP-1:0] samp;
  logic [HALF-1:0] low_hold;

  for (genvar i = 0; i < NTAP; i++) begin : g_cell
    logic smp;    // one sampling flip-flop, clocked by its own phase
    always_ff @(posedge taps[i]) smp <= hit_in;
    assign samp[i] = smp;
  end

  always_ff @(posedge taps[HALF]) low_hold <= samp[HALF-1:0];

  always_ff @(posedge clk) word <= {samp[NTAP-1:HALF], low_hold};
endmodule
