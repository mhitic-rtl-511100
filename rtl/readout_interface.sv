// readout_interface: zero-skipping read-out of the channel RAMs into the FIFO.
//
// A priority encoder over the channels' `empty` flags picks the lowest-numbered
// channel that holds data, so empty channels cost no time. The head entry of
// that channel goes to the data processor (`sel_entry`), and the processed
// times come back (`lead_*`, `trail_*`). Each edge becomes one FIFO word
// {channel, trailing flag, time}: an entry with one edge is written and popped
// in one cycle; an entry with both edges takes two cycles (leading first), the
// channel being held between them. Nothing moves while `go` is low (no common
// reference yet) or the FIFO is full, so a full FIFO back-pressures the RAMs.
// Throughput: one word per clock.
//
// The priority-encoded zero skipping follows the published MHITIC chip; the word format,
// the two-cycle split of double-edge entries and the `go` gating are this
// design's own.
module readout_interface
  import mhitic_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              go,
  input  logic [N-1:0]      ch_empty,
  input  ram_entry_t        ch_data [N],
  output logic [N-1:0]      ch_pop,
  // to / from the data processor
  output ram_entry_t        sel_entry,
  input  logic              lead_v,
  input  logic [TIME_W-1:0] lead_time,
  input  logic              trail_v,
  input  logic [TIME_W-1:0] trail_time,
  // to the FIFO
  input  logic              fifo_full,
  output logic              fifo_wr,
  output out_word_t         fifo_data
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic          half;       // leading word of a double-edge entry already sent
  logic [SW-1:0] half_ch;    // channel held while `half` is set
  logic [SW-1:0] pri_ch;     // priority-encoder result
  logic          any;
  logic [SW-1:0] ch;
  logic          step;

  always_comb begin
    pri_ch = '0;
    any    = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!ch_empty[i]) begin
        pri_ch = SW'(i);
        any    = 1'b1;
      end
    end
  end

  assign ch        = half ? half_ch : pri_ch;
  assign sel_entry = ch_data[ch];
  assign step      = go && (half || any) && !fifo_full;

  always_comb begin
    fifo_wr   = 1'b0;
    fifo_data = '0;
    ch_pop    = '0;
    fifo_data.channel = CH_W'(ch);
    if (step) begin
      fifo_wr = lead_v || trail_v;
      if (lead_v && !half) begin
        fifo_data.trailing = 1'b0;
        fifo_data.time_val = lead_time;
        if (!trail_v) ch_pop[ch] = 1'b1;
      end else begin
        fifo_data.trailing = 1'b1;
        fifo_data.time_val = trail_time;
        ch_pop[ch] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      half    <= 1'b0;
      half_ch <= '0;
    end else if (step) begin
      if (lead_v && trail_v && !half) begin
        half    <= 1'b1;
        half_ch <= ch;
      end else begin
        half    <= 1'b0;
      end
    end
  end
endmodule
