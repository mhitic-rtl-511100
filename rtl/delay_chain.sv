// delay_chain: behavioural model of the controlled delay line (not synthesizable).
//
// The real part is a full-custom chain of 16 current-starved buffers whose delay
// is regulated so that the 16 stages span one reference-clock period; it can be
// set down to 500 ps per stage. This model stands in for it in simulation: tap 0
// is the reference clock itself and each further tap is the previous one
// delayed by TAP_DELAY_PS, so tap[i] rises i*TAP_DELAY_PS after the clock.
// The regulation loop is not modelled: the clock period is expected to be
// NTAP*TAP_DELAY_PS (962 ps per stage at 65 MHz, the chip's top speed).
// STAGE_ERR_PS[i] adds a fixed error to the stage that drives tap i (i >= 1;
// element 0 is unused), to model stage mismatch, the cause of the periodic
// differential non-linearity of such a converter. The bin between tap 15 and
// the next clock edge absorbs the sum of the errors, as a locked line would.
// All errors are zero by default.
//
// Ports: clk_ref in, taps[NTAP-1:0] out. Delays are in picoseconds.
module delay_chain #(
  parameter int unsigned NTAP         = 16,
  parameter int unsigned TAP_DELAY_PS = 962,
  parameter int          STAGE_ERR_PS [NTAP] = '{default: 0}
) (
  input  logic            clk_ref,
  output logic [NTAP-1:0] taps
);
  timeunit 1ps; timeprecision 1ps;

  assign taps[0] = clk_ref;
  for (genvar i = 1; i < NTAP; i++) begin : g_stage
    // One buffer of the chain; each stage is shorter than half a period, so
    // the clock pulse passes every stage intact.
    assign #(int'(TAP_DELAY_PS) + STAGE_ERR_PS[i]) taps[i] = taps[i-1];
  end
endmodule
