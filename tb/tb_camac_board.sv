// tb_camac_board: four TDC chips (32 channels) on one read-out bus in a daisy
// chain, as on a four-chip acquisition board. All chips share the clock, the
// common start and the read strobe; chip k's pri_in is chip k-1's pri_out, and
// the bus carries the word of the one chip whose dout_valid is high.
// Hits (leading edges only, common start) go to random channels of random
// chips. Checks: at most one chip drives the bus; a chip is read only when all
// earlier chips are empty (sparse read-out skips empty chips); and each
// channel of each chip returns exactly its expected relative times in order.
module tb_camac_board;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 962;
  localparam int unsigned T = NTAP * D;
  localparam int unsigned NCHIP = 4;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, rd = 1'b0, com_in = 1'b0;
  logic [NCH-1:0]   ch_in [NCHIP];
  logic [OUT_W-1:0] dout [NCHIP];
  logic [NCHIP-1:0] dv, pri_o, f_empty, f_full, c_valid;
  logic [NCH-1:0]   ovf [NCHIP];
  int checks = 0, failures = 0, n_skip = 0, n_reads = 0;
  time t0, com_t;
  time rises [NCHIP][NCH][$];
  out_word_t got [NCHIP][NCH][$];

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    initial ch_in[k] = '0;
    mhitic_top chip (
      .clk_ref(clk), .rst(rst), .clear(clear), .ch_in(ch_in[k]), .com_in(com_in),
      .edge_sel(2'b01), .common_stop(1'b0), .dp_enable(1'b1),
      .rd(rd), .dout(dout[k]), .dout_valid(dv[k]),
      .pri_in(k == 0 ? 1'b0 : pri_o[k-1]), .pri_out(pri_o[k]),
      .fifo_empty(f_empty[k]), .fifo_full(f_full[k]),
      .ch_overflow(ovf[k]), .com_valid(c_valid[k]));
  end

  always #(T/2) clk = ~clk;

  function automatic time safe(time t);
    time r;
    r = (t - t0) % D;
    if (r < 150) return t + (150 - r);
    if (r > D - 150) return t + (D - r) + 150;
    return t;
  endfunction

  function automatic longint bin_of(time t);
    return longint'((t - t0 + D - 1) / D);
  endfunction

  task automatic pulse(int k, int c, time start);
    time a;
    a = safe(start);
    rises[k][c].push_back(a);
    fork
      begin
        #(a - $time) ch_in[k][c] = 1'b1;
        #(3000)      ch_in[k][c] = 1'b0;
      end
    join_none
  endtask

  // bus reader: one word per clock from whichever chip is selected
  always @(negedge clk) begin
    int sel;
    rd <= 1'b0;
    sel = -1;
    checks++;
    if (!$onehot0(dv)) begin failures++; $display("%0t several chips drive the bus", $time); end
    for (int k = NCHIP - 1; k >= 0; k--) if (dv[k]) sel = k;
    if (sel >= 0) begin
      out_word_t w;
      checks++;
      for (int j = 0; j < sel; j++)
        if (!f_empty[j]) begin failures++; $display("chip %0d read before chip %0d", sel, j); end
      if (sel > 0 && f_empty[0]) n_skip++;
      w = out_word_t'(dout[sel]);
      got[sel][w.channel].push_back(w);
      n_reads++;
      rd <= 1'b1;
    end
  end

  initial begin
    time now;
    repeat (3) @(posedge clk);
    t0 = $time;
    #1 rst = 1'b0;
    now = $time;
    com_t = safe(now + 2 * T + 4000);
    fork begin #(com_t - $time) com_in = 1'b1; #(4000) com_in = 1'b0; end join_none
    // 400 hits, about one every 3 clocks overall, on random chips and channels
    for (int n = 0; n < 400; n++) begin
      int k, c;
      k = $urandom % NCHIP;
      c = $urandom % NCH;
      pulse(k, c, now + 6 * T + time'(n) * 3 * T + time'($urandom % T));
    end
    #(1300 * T);
    for (int k = 0; k < NCHIP; k++)
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (got[k][c].size() != rises[k][c].size()) begin
          failures++;
          $display("chip %0d ch %0d: %0d words, expected %0d", k, c, got[k][c].size(), rises[k][c].size());
        end
        for (int i = 0; i < rises[k][c].size() && i < got[k][c].size(); i++) begin
          longint e;
          e = bin_of(rises[k][c][i]) - bin_of(com_t);
          checks++;
          if (longint'(got[k][c][i].time_val) != e || got[k][c][i].trailing) begin
            failures++;
            $display("chip %0d ch %0d hit %0d: %0d expected %0d", k, c, i, got[k][c][i].time_val, e);
          end
        end
      end
    checks++;
    if (n_skip == 0) begin failures++; $display("no read skipped an empty chip"); end
    $display("words read %0d, reads past an empty chip 0: %0d", n_reads, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
