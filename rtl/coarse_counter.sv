// coarse_counter: 19-bit synchronous coarse time counter.
//
// Counts reference-clock periods from reset and wraps at 2^COARSE_W, which with
// the 4 fine bits gives the 23-bit dynamic range. `count` is the current
// period; `count_prev` is the count of the period before, which is the period
// whose samples the sampling cells present in the same cycle, so hit time and
// coarse count line up. Synchronous reset, active high.
module coarse_counter #(
  parameter int unsigned COARSE_W = 19
) (
  input  logic                clk,
  input  logic                rst,
  output logic [COARSE_W-1:0] count,
  output logic [COARSE_W-1:0] count_prev
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= '0;
      count_prev <= '1;   // the period "before" period 0
    end else begin
      count      <= count + 1'b1;
      count_prev <= count;
    end
  end
endmodule
