// output_fifo: 512-word read-out buffer with multi-chip sparse read-out.
//
// A synchronous FIFO of DEPTH words: `wr` stores `din` unless full; the oldest
// word is always shown on `dout` (no read latency) and `rd` removes it. Its
// depth sets how many hits one chip can hold for read-out.
//
// Several chips share one read-out bus in a daisy chain ordered by priority.
// `pri_in` is high when a chip earlier in the chain holds data; this chip then
// waits. `pri_out = pri_in | !empty` goes to the next chip. The chip is
// `selected` (drives the bus, `dout_valid`, and accepts `rd`) only when it holds
// data and no earlier chip does, so a chain controller reads only chips with
// data and never polls empty ones.
//
// Depth 512 follows the published MHITIC chip, as does reading only chips with valid data;
// the pri_in/pri_out chain is this design's own realisation of it.
module output_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 27
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid,
  output logic             empty,
  input  logic             pri_in,
  output logic             pri_out,
  output logic             selected
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      used;
  logic             do_wr, do_rd;

  assign empty      = (used == 0);
  assign full       = (used == (AW+1)'(DEPTH));
  assign selected   = !empty && !pri_in;
  assign pri_out    = pri_in || !empty;
  assign dout       = mem[rd_ptr];
  assign dout_valid = selected;

  assign do_wr = wr && !full;
  assign do_rd = rd && selected;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      used <= used + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
