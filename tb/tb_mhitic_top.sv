// tb_mhitic_top: end-to-end test of the TDC chip at its default sizes.
//
// The bench drives channel and common inputs with pulses at picosecond times
// (kept 150 ps away from any sampling phase) and keeps each edge time. Its
// reference model turns an edge at time t after the clock edge that ended
// reset into bin ceil(t/D), groups the bins of a channel by clock period
// (16 bins), keeps the first leading and first trailing edge of each period
// that the edge mode selects, and forms the expected read-out words: absolute
// time with the processor disabled, bin - common in common-start mode and
// common - bin in common-stop mode, modulo 2^23. The words read from the chip
// over the daisy-chain bus are compared channel by channel, in order.
//
// Phases: common start (both edges, incl. two pulses in one period and hits in
// consecutive periods), common stop, processor disabled with leading edges only,
// trailing edges only, channel RAM overflow, FIFO full with back-pressure, and
// clear. Each mechanism is counted and must occur at least once.
module tb_mhitic_top;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 962;
  localparam int unsigned T = NTAP * D;
  localparam int unsigned NC = 8;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic [NC-1:0] ch_in = '0;
  logic com_in = 1'b0;
  logic [1:0] edge_sel = 2'b11;
  logic common_stop = 1'b0, dp_enable = 1'b1;
  logic rd = 1'b0, pri_in = 1'b0;
  logic [OUT_W-1:0] dout;
  logic dout_valid, pri_out, fifo_empty, fifo_full, com_valid;
  logic [NC-1:0] ch_overflow;

  mhitic_top dut (.clk_ref(clk), .*);

  always #(T/2) clk = ~clk;

  int checks = 0, failures = 0;
  time t0;

  // edges scheduled in the current phase
  typedef struct { time t; bit rise; } edge_t;
  edge_t edges [NC][$];
  time   com_rise;
  out_word_t got [NC][$];
  bit reading = 1'b0;

  // mechanism counters
  int n_start = 0, n_stop = 0, n_bypass = 0, n_lead_only = 0, n_trail_only = 0;
  int n_both = 0, n_merged = 0, n_consec = 0, n_ram_ovf = 0, n_fifo_full = 0;
  int n_zero_skip = 0, n_chain_hold = 0, n_clear = 0;

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

  task automatic pulse(int c, time start, time width);
    time a, b;
    a = safe(start);
    b = safe(a + width);
    edges[c].push_back('{a, 1'b1});
    edges[c].push_back('{b, 1'b0});
    fork
      begin
        #(a - $time) ch_in[c] = 1'b1;
        #(b - a)     ch_in[c] = 1'b0;
      end
    join_none
  endtask

  task automatic com_pulse(time start);
    time a;
    a = safe(start);
    com_rise = a;
    fork
      begin
        #(a - $time) com_in = 1'b1;
        #(5 * D)     com_in = 1'b0;
      end
    join_none
  endtask

  // read-out: one word per clock while this chip is selected
  always @(negedge clk) begin
    rd <= 1'b0;
    if (pri_in && !fifo_empty) begin
      n_chain_hold++;
      checks++;
      if (dout_valid || !pri_out) begin failures++; $display("chain hold violated"); end
    end
    if (reading && dout_valid) begin
      out_word_t w;
      w = out_word_t'(dout);
      got[w.channel].push_back(w);
      rd <= 1'b1;
    end
    if (fifo_full) n_fifo_full++;
  end

  // zero skipping: a word taken from a channel while a lower one is empty
  always @(posedge clk) begin
    if (dut.u_ro.fifo_wr && dut.u_ro.fifo_data.channel != 0 && dut.ram_empty[0]) n_zero_skip++;
    if (dut.u_ro.fifo_wr && dut.u_ro.half) n_both++;
  end

  // reference model and comparison for one phase
  task automatic check_phase(string name, int limit);
    longint cbin;
    cbin = bin_of(com_rise);
    for (int c = 0; c < NC; c++) begin
      out_word_t exp_w [$];
      longint    per   [$];
      int        entries;
      edge_t     e;
      entries = 0;
      // edges are scheduled in time order per channel
      for (int i = 0; i < edges[c].size(); ) begin
        longint p, lb, tb;
        bit lv, tv;
        int nl;
        p = bin_of(edges[c][i].t) / NTAP;
        lv = 0; tv = 0; lb = 0; tb = 0; nl = 0;
        while (i < edges[c].size() && bin_of(edges[c][i].t) / NTAP == p) begin
          e = edges[c][i];
          if (e.rise) begin nl++; if (!lv) begin lv = 1; lb = bin_of(e.t); end end
          else if (!tv) begin tv = 1; tb = bin_of(e.t); end
          i++;
        end
        if (nl > 1 && edge_sel[0]) n_merged++;
        if (per.size() > 0 && per[$] == p - 1 && lv && edge_sel[0]) n_consec++;
        per.push_back(p);
        lv &= edge_sel[0];
        tv &= edge_sel[1];
        if (!(lv || tv)) continue;
        entries++;
        if (entries > limit) continue;
        if (lv && !tv) n_lead_only++;
        if (tv && !lv) n_trail_only++;
        for (int k = 0; k < 2; k++) begin
          out_word_t w;
          longint b, r;
          if (k == 0 && !lv) continue;
          if (k == 1 && !tv) continue;
          b = (k == 0) ? lb : tb;
          if (!dp_enable) r = b;
          else if (common_stop) r = cbin - b;
          else r = b - cbin;
          r = ((r % (1 << TIME_W)) + (1 << TIME_W)) % (1 << TIME_W);
          w.channel = CH_W'(c);
          w.trailing = (k == 1);
          w.time_val = TIME_W'(r);
          exp_w.push_back(w);
        end
      end
      checks++;
      if (exp_w.size() != got[c].size()) begin
        failures++;
        $display("%s ch%0d: %0d words, expected %0d", name, c, got[c].size(), exp_w.size());
      end
      for (int i = 0; i < exp_w.size() && i < got[c].size(); i++) begin
        checks++;
        if (exp_w[i] != got[c][i]) begin
          failures++;
          $display("%s ch%0d word %0d: got t=%0d tr=%0d expected t=%0d tr=%0d", name, c, i,
                   got[c][i].time_val, got[c][i].trailing, exp_w[i].time_val, exp_w[i].trailing);
        end
      end
      checks++;
      if ((entries > limit) != ch_overflow[c]) begin
        failures++; $display("%s ch%0d overflow flag %b", name, c, ch_overflow[c]);
      end
      if (ch_overflow[c]) n_ram_ovf++;
    end
  endtask

  task automatic start_phase(logic [1:0] es, logic stop, logic dp);
    edge_sel = es; common_stop = stop; dp_enable = dp;
    @(posedge clk); #1 clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    n_clear++;
    checks++;
    if (!fifo_empty || com_valid) begin failures++; $display("clear did not empty the chip"); end
    for (int c = 0; c < NC; c++) begin edges[c].delete(); got[c].delete(); end
    com_rise = 0;
  endtask

  task automatic drain();
    reading = 1'b1;
    repeat (700) @(posedge clk);
    #1;
  endtask

  initial begin
    time now;
    // reset; the clock edge that ends reset is time zero of the counter
    repeat (3) @(posedge clk);
    t0 = $time;
    #1 rst = 1'b0;

    // ---- 1: common start, both edges ----
    start_phase(2'b11, 1'b0, 1'b1);
    n_start++;
    reading = 1'b1;
    now = $time;
    com_pulse(now + 2 * T + 3100);
    for (int n = 0; n < 60; n++) begin
      int c;
      c = $urandom % NC;
      if (c == 0 && n % 2 == 1) c = 1 + $urandom % (NC - 1);
      pulse(c, now + 5 * T + time'(n) * 5 * T + time'($urandom % T), time'(2000 + $urandom % (2 * T)));
    end
    // two pulses inside one period, and leading edges in consecutive periods
    pulse(5, now + 400 * T + 200, 2500);
    pulse(5, now + 400 * T + 6 * D + 200, 2500);
    pulse(6, now + 420 * T + 2 * D + 300, T);
    pulse(6, now + 422 * T + 5 * D + 300, 3000);
    pulse(6, now + 423 * T + 9 * D + 300, 3000);
    #(430 * T);
    drain();
    check_phase("start", 32);

    // ---- 2: common stop, both edges ----
    start_phase(2'b11, 1'b1, 1'b1);
    n_stop++;
    now = $time;
    for (int n = 0; n < 50; n++)
      pulse($urandom % NC, now + 2 * T + time'(n) * 4 * T + time'($urandom % T), time'(3000 + $urandom % T));
    com_pulse(now + 210 * T + 1234);
    #(215 * T);
    drain();
    check_phase("stop", 32);

    // ---- 3: processor disabled, leading edges only ----
    start_phase(2'b01, 1'b0, 1'b0);
    n_bypass++;
    now = $time;
    for (int n = 0; n < 50; n++)
      pulse($urandom % NC, now + 2 * T + time'(n) * 3 * T + time'($urandom % T), time'(1500 + $urandom % T));
    #(160 * T);
    drain();
    check_phase("leading", 32);

    // ---- 4: trailing edges only, common start ----
    start_phase(2'b10, 1'b0, 1'b1);
    now = $time;
    com_pulse(now + T + 500);
    for (int n = 0; n < 50; n++)
      pulse($urandom % NC, now + 3 * T + time'(n) * 3 * T + time'($urandom % T), time'(1500 + $urandom % T));
    #(160 * T);
    drain();
    check_phase("trailing", 32);

    // ---- 5: channel RAM overflow: 40 hits on channel 3 before the start ----
    start_phase(2'b01, 1'b0, 1'b1);
    reading = 1'b0;
    now = $time;
    for (int n = 0; n < 40; n++)
      pulse(3, now + 2 * T + time'(n) * 3 * T + time'($urandom % T), 4000);
    #(125 * T);
    checks++;
    if (!fifo_empty) begin failures++; $display("read-out ran without a common hit"); end
    com_pulse($time + 700);
    #(4 * T);
    drain();
    check_phase("overflow", 32);

    // ---- 6: FIFO full, read-out stopped, then daisy-chain hold ----
    start_phase(2'b11, 1'b0, 1'b0);
    reading = 1'b0;
    now = $time;
    // about one pulse per three clocks: below the read-out rate, so the
    // words pile up in the FIFO and not in the channel RAMs
    for (int n = 0; n < 288; n++)
      pulse(n % NC, now + 2 * T + time'(n) * 3 * T + time'($urandom % (T / 2)),
            time'(1500 + $urandom % (T / 2)));
    #(880 * T);
    checks++;
    if (!fifo_full) begin failures++; $display("FIFO did not fill"); end
    @(posedge clk); #1 pri_in = 1'b1;
    repeat (20) @(posedge clk);
    @(posedge clk); #1 pri_in = 1'b0;
    drain();
    check_phase("fifo_full", 1000);

    // ---- every mechanism must have occurred ----
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_start, n_stop, n_bypass, n_lead_only, n_trail_only, n_both, n_merged, n_consec,
              n_ram_ovf, n_fifo_full, n_zero_skip, n_chain_hold, n_clear};
      nm = '{"common_start", "common_stop", "processor_disabled", "leading_only", "trailing_only",
             "both_edges_entry", "double_hit_in_period", "hits_consecutive_periods", "ram_overflow",
             "fifo_full", "zero_skip", "chain_hold", "clear"};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-26s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
