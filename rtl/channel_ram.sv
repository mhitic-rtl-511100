// channel_ram: dual-port hit memory of one channel (32 entries).
//
// Written from the acquisition side, one entry per clock period that held a
// hit; read from the read-out side in arrival order. It is a circular buffer:
// the write port writes at wr_ptr, the read port shows the entry at rd_ptr on
// `rd_data` (no read latency) and `pop` advances it. When all DEPTH entries are
// in use a further hit is dropped and the sticky `overflow` flag is set until
// `clear`. `clear` empties the memory in one cycle. Both ports use one clock.
//
// The published MHITIC chip fixes the depth (32 hits per channel) and the dual-port
// organisation; the circular-buffer addressing and the drop-on-full policy are
// this design's own.
module channel_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 29
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  // write port
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  // read port
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      used;

  assign empty   = (used == 0);
  assign full    = (used == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      used     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      used <= used + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) !(pop && empty))
    else $error("channel_ram: pop while empty");
endmodule
