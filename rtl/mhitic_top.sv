// mhitic_top: 8-channel multi-hit time-to-digital converter.
//
// Every channel input, and the common (start/stop) input, is sampled at the 16
// phases of a delay line locked to the reference clock, so each clock period
// yields a 16-bit picture of the input with one bin per delay stage (about
// 1 ns at 62-65 MHz). The picture is reduced at once to a 10-bit hit code
// (first leading / first trailing edge and their positions) and, only if it
// holds an edge, written with the 19-bit coarse count into that channel's
// 32-entry RAM. The common input goes into the common hit register instead.
// The read-out side scans the non-empty channel RAMs by priority, lets the data
// processor subtract the common time (sign by common-start/common-stop mode, or
// no subtraction when disabled) and queues one 27-bit word per edge in the
// 512-word FIFO, which is read over a daisy-chained multi-chip bus.
//
// Timing: an edge at time t after the clock edge that ended reset (counter 0)
// is measured as bin ceil(t / TAP_DELAY_PS). It reaches its channel RAM two
// clock edges after the end of the period that held it. Read-out moves one
// edge per clock.
//
// Block structure and sizes follow the published MHITIC chip; the delay line is a
// behavioural model, and hit-code layout, word format, read-out gating and the
// daisy-chain signals are this design's own.
module mhitic_top
  import mhitic_pkg::*;
#(
  parameter int unsigned N_CH         = NCH,
  parameter int unsigned RAM_DEPTH    = 32,
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned TAP_DELAY_PS = 962,
  parameter int          STAGE_ERR_PS [NTAP] = '{default: 0}   // delay-line model only
) (
  input  logic              clk_ref,      // reference clock, period 16*TAP_DELAY_PS
  input  logic              rst,          // synchronous, active high
  input  logic              clear,        // empty RAMs and FIFO, forget common hit
  input  logic [N_CH-1:0]   ch_in,        // measuring channels
  input  logic              com_in,       // common start/stop channel
  // configuration
  input  logic [1:0]        edge_sel,     // bit0 leading, bit1 trailing
  input  logic              common_stop,  // 1 common stop, 0 common start
  input  logic              dp_enable,    // subtract the common time
  // read-out bus
  input  logic              rd,
  output logic [OUT_W-1:0]  dout,         // {channel[2:0], trailing, time[22:0]}
  output logic              dout_valid,
  input  logic              pri_in,       // an earlier chip in the chain has data
  output logic              pri_out,
  output logic              fifo_empty,
  output logic              fifo_full,
  // status
  output logic [N_CH-1:0]   ch_overflow,
  output logic              com_valid
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NIN = N_CH + 1;   // channels plus the common input
  localparam int unsigned RAM_W = $bits(ram_entry_t);

  logic [NTAP-1:0]     taps;
  logic [COARSE_W-1:0] count, count_prev;
  logic [NIN-1:0]      in_all;
  logic [NTAP-1:0]     word [NIN];
  logic [NIN-1:0]      hit;
  hit_code_t           code [NIN];
  edge_sel_e           esel;

  assign in_all = {com_in, ch_in};
  assign esel   = edge_sel_e'(edge_sel);

  delay_chain #(.NTAP(NTAP), .TAP_DELAY_PS(TAP_DELAY_PS), .STAGE_ERR_PS(STAGE_ERR_PS)) u_delay (
    .clk_ref (clk_ref),
    .taps    (taps)
  );

  coarse_counter #(.COARSE_W(COARSE_W)) u_coarse (
    .clk        (clk_ref),
    .rst        (rst),
    .count      (count),
    .count_prev (count_prev)
  );

  for (genvar c = 0; c < NIN; c++) begin : g_in
    sampling_cells #(.NTAP(NTAP)) u_samp (
      .clk    (clk_ref),
      .taps   (taps),
      .hit_in (in_all[c]),
      .word   (word[c])
    );
    transition_detect u_det (
      .clk      (clk_ref),
      .rst      (rst),
      .word     (word[c]),
      // the common input always records its leading edge
      .edge_sel ((c == N_CH) ? EDGE_LEADING : esel),
      .hit      (hit[c]),
      .code     (code[c])
    );
  end

  // ---- channel RAMs ----
  logic [N_CH-1:0] ram_empty, ram_pop;
  ram_entry_t      ram_head [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ram
    logic [RAM_W-1:0] rd_bits;
    channel_ram #(.DEPTH(RAM_DEPTH), .WIDTH(RAM_W)) u_ram (
      .clk      (clk_ref),
      .rst      (rst),
      .clear    (clear),
      .wr_en    (hit[c]),
      .wr_data  ({count_prev, code[c]}),
      .pop      (ram_pop[c]),
      .rd_data  (rd_bits),
      .empty    (ram_empty[c]),
      .full     (),
      .overflow (ch_overflow[c])
    );
    assign ram_head[c] = ram_entry_t'(rd_bits);
  end

  // ---- common hit register ----
  logic [TIME_W-1:0] com_time;

  common_hit_register u_com (
    .clk      (clk_ref),
    .rst      (rst),
    .clear    (clear),
    .hit      (hit[N_CH]),
    .code     (code[N_CH]),
    .coarse   (count_prev),
    .com_time (com_time),
    .valid    (com_valid)
  );

  // ---- data processor and read-out interface ----
  ram_entry_t        sel_entry;
  logic              lead_v, trail_v;
  logic [TIME_W-1:0] lead_time, trail_time;
  logic              f_wr;
  out_word_t         f_din;

  data_processor u_dp (
    .entry       (sel_entry),
    .com_time    (com_time),
    .enable      (dp_enable),
    .common_stop (common_stop),
    .lead_v      (lead_v),
    .lead_time   (lead_time),
    .trail_v     (trail_v),
    .trail_time  (trail_time)
  );

  readout_interface #(.N(N_CH)) u_ro (
    .clk        (clk_ref),
    .rst        (rst),
    .clear      (clear),
    .go         (!dp_enable || com_valid),
    .ch_empty   (ram_empty),
    .ch_data    (ram_head),
    .ch_pop     (ram_pop),
    .sel_entry  (sel_entry),
    .lead_v     (lead_v),
    .lead_time  (lead_time),
    .trail_v    (trail_v),
    .trail_time (trail_time),
    .fifo_full  (fifo_full),
    .fifo_wr    (f_wr),
    .fifo_data  (f_din)
  );

  output_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(OUT_W)) u_fifo (
    .clk        (clk_ref),
    .rst        (rst),
    .clear      (clear),
    .wr         (f_wr),
    .din        (f_din),
    .full       (fifo_full),
    .rd         (rd),
    .dout       (dout),
    .dout_valid (dout_valid),
    .empty      (fifo_empty),
    .pri_in     (pri_in),
    .pri_out    (pri_out),
    .selected   ()
  );
endmodule
