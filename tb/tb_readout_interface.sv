// tb_readout_interface: eight bench queues stand in for the channel RAMs and
// the bench computes absolute edge times in place of the data processor.
// Checks: per channel, the FIFO words are the stored edges in order (leading
// before trailing); every word comes from the lowest non-empty channel (or the
// channel held for its trailing edge); a word moves every cycle that the
// interface may move one (zero skipping, one word per clock); nothing moves
// while `go` is low or the FIFO is full.
module tb_readout_interface;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, go = 1'b0, fifo_full = 1'b0;
  logic [N-1:0] ch_empty, ch_pop;
  ram_entry_t ch_data [N];
  ram_entry_t sel_entry;
  logic lead_v, trail_v, fifo_wr;
  logic [TIME_W-1:0] lead_time, trail_time;
  out_word_t fifo_data;
  ram_entry_t q [N][$];
  out_word_t exp_w [N][$];
  int checks = 0, failures = 0, n_words = 0, n_double = 0, n_stall = 0;
  logic held = 1'b0;
  int held_ch = 0;

  readout_interface #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  // bench "data processor": absolute times
  assign lead_v     = sel_entry.code.lead_v;
  assign trail_v    = sel_entry.code.trail_v;
  assign lead_time  = {sel_entry.coarse, sel_entry.code.lead_pos};
  assign trail_time = {sel_entry.coarse, sel_entry.code.trail_pos};

  always_comb
    for (int c = 0; c < N; c++) begin
      ch_empty[c] = (q[c].size() == 0);
      ch_data[c]  = (q[c].size() > 0) ? q[c][0] : '0;
    end

  task automatic add_entry(int c);
    ram_entry_t e;
    out_word_t w;
    e.coarse = COARSE_W'($urandom);
    e.code = hit_code_t'($urandom);
    if (!e.code.lead_v && !e.code.trail_v) e.code.lead_v = 1'b1;
    q[c].push_back(e);
    if (e.code.lead_v) begin
      w.channel = CH_W'(c); w.trailing = 0; w.time_val = {e.coarse, e.code.lead_pos};
      exp_w[c].push_back(w);
    end
    if (e.code.trail_v) begin
      w.channel = CH_W'(c); w.trailing = 1; w.time_val = {e.coarse, e.code.trail_pos};
      exp_w[c].push_back(w);
    end
  endtask

  // monitor before each clock edge
  always @(negedge clk) if (!rst) begin
    int lowest;
    logic may_move;
    lowest = -1;
    for (int c = N - 1; c >= 0; c--) if (q[c].size() > 0) lowest = c;
    may_move = go && !fifo_full && (lowest >= 0 || held);
    checks++;
    if (fifo_wr != may_move) begin
      failures++; $display("%0t fifo_wr=%b expected %b", $time, fifo_wr, may_move);
    end
    if (!may_move && (go === 1'b0 || fifo_full) && (lowest >= 0)) n_stall++;
    if (fifo_wr) begin
      int c;
      c = int'(fifo_data.channel);
      checks++;
      if (c != (held ? held_ch : lowest)) begin
        failures++; $display("%0t channel %0d, expected %0d", $time, c, held ? held_ch : lowest);
      end
      checks++;
      if (exp_w[c].size() == 0 || fifo_data != exp_w[c][0]) begin
        failures++; $display("%0t word %h unexpected", $time, fifo_data);
      end else void'(exp_w[c].pop_front());
      n_words++;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (fifo_wr && sel_entry.code.lead_v && sel_entry.code.trail_v && !held) begin
      held <= 1'b1; held_ch <= int'(fifo_data.channel); n_double++;
    end else if (fifo_wr) held <= 1'b0;
    for (int c = 0; c < N; c++) if (ch_pop[c]) void'(q[c].pop_front());
  end

  initial begin
    @(posedge clk); @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // channels fill sparsely: most stay empty most of the time
      if ($urandom % 3 == 0) add_entry($urandom % N);
      go = (n > 20) && !(n > 1000 && n < 1050);
      fifo_full = ($urandom % 8 == 0);
      @(posedge clk); #1;
    end
    go = 1; fifo_full = 0;
    repeat (200) @(posedge clk);
    #1;
    for (int c = 0; c < N; c++) begin
      checks++;
      if (exp_w[c].size() != 0) begin failures++; $display("channel %0d not drained", c); end
    end
    checks++; if (n_double == 0 || n_stall == 0) begin failures++; $display("mechanism not exercised"); end
    $display("words=%0d double=%0d stalls=%0d", n_words, n_double, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
