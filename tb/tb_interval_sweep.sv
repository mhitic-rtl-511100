// tb_interval_sweep: measures known start-to-hit intervals in common-start
// mode with the start at a random clock phase, and checks the spread of the
// results against an ideal quantiser.
//
// Part A, fine sweep: intervals 22..40 ns in 70 ps steps, 200 measurements
// each (eight channels measure eight intervals per start). For an ideal
// converter each result is floor(X/D) or ceil(X/D), the mean is X/D (within a
// binomial bound) and the standard deviation, sqrt(f*(1-f)) with f the
// fractional part of X/D, is never above 0.5 LSB. All three are checked;
// the rms error over the sweep is printed (0.41 LSB for an ideal quantiser).
// Part B, dynamic range: one start and eight hits at 1 us .. 8 ms, twice;
// each result must again be floor or ceil of X/D, which exercises the
// coarse-counter wrap and the modulo-2^23 subtraction across the full scale.
module tb_interval_sweep;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 962;
  localparam int unsigned T = NTAP * D;
  localparam int NX = 258;          // 22 ns .. 40 ns in 70 ps steps
  localparam int M  = 200;          // measurements per interval

  logic clk = 1'b0, rst = 1'b1, com_in = 1'b0, rd = 1'b0;
  logic [NCH-1:0] ch_in = '0;
  logic [OUT_W-1:0] dout;
  logic dout_valid, pri_out, fifo_empty, fifo_full, com_valid;
  logic [NCH-1:0] ch_overflow;
  int checks = 0, failures = 0;
  longint xs [NCH];          // interval being measured on each channel (ps)
  int xi [NCH];              // its index in the sweep, -1 in part B
  real sum [NX], sum2 [NX];
  int cnt [NX];
  real err2 = 0;
  int nerr = 0, n_b = 0;

  mhitic_top dut (
    .clk_ref(clk), .rst(rst), .clear(1'b0), .ch_in(ch_in), .com_in(com_in),
    .edge_sel(2'b01), .common_stop(1'b0), .dp_enable(1'b1),
    .rd(rd), .dout(dout), .dout_valid(dout_valid), .pri_in(1'b0), .pri_out(pri_out),
    .fifo_empty(fifo_empty), .fifo_full(fifo_full), .ch_overflow(ch_overflow), .com_valid(com_valid));

  always #(T/2) clk = ~clk;

  always @(negedge clk) begin
    rd <= 1'b0;
    if (dout_valid) begin
      out_word_t o;
      longint m, lo;
      real x;
      o = out_word_t'(dout);
      m = longint'(o.time_val);
      lo = xs[o.channel] / D;
      x = real'(xs[o.channel]) / D;
      checks++;
      if (m != lo && m != lo + 1) begin
        failures++;
        $display("interval %0d ps on ch %0d measured %0d", xs[o.channel], o.channel, m);
      end
      if (xi[o.channel] >= 0) begin
        sum[xi[o.channel]] += real'(m);
        sum2[xi[o.channel]] += real'(m) * real'(m);
        cnt[xi[o.channel]]++;
        err2 += (real'(m) - x) * (real'(m) - x);
        nerr++;
      end else n_b++;
      rd <= 1'b1;
    end
  end

  // waits until absolute time h, in steps short enough for any simulator
  task automatic wait_until(time h);
    while (h - $time > 64'd1_000_000_000) #(1_000_000_000);
    if (h > $time) #(h - $time);
  endtask

  task automatic event_at(time gap_after);
    time s;
    s = $time + time'($urandom % T);
    fork begin #(s - $time) com_in = 1'b1; #(3000) com_in = 1'b0; end join_none
    for (int c = 0; c < NCH; c++) begin
      fork
        automatic int cc = c;
        automatic time h = s + time'(xs[c]);
        begin wait_until(h); ch_in[cc] = 1'b1; #(3000) ch_in[cc] = 1'b0; end
      join_none
    end
    wait_until($time + gap_after);
  endtask

  initial begin
    real worst_sd;
    longint long_x [NCH];
    long_x = '{64'd1_000_000, 64'd10_000_000, 64'd100_000_000, 64'd1_000_000_000,
              64'd2_000_000_000, 64'd4_000_000_000, 64'd6_000_000_000, 64'd8_000_000_000};
    for (int i = 0; i < NX; i++) begin sum[i] = 0; sum2[i] = 0; cnt[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);

    // ---- part A ----
    for (int k = 0; k < NX * M / NCH; k++) begin
      for (int c = 0; c < NCH; c++) begin
        int idx;
        idx = (k * NCH + c) % NX;
        xi[c] = idx;
        xs[c] = 22000 + 70 * idx;
      end
      event_at(16 * T);   // all results read before the next start
    end
    worst_sd = 0;
    for (int i = 0; i < NX; i++) begin
      real mean, sd, x, f, tol;
      x = real'(22000 + 70 * i) / D;
      f = x - $floor(x);
      mean = sum[i] / cnt[i];
      sd = sum2[i] / cnt[i] - mean * mean;
      sd = (sd > 0) ? $sqrt(sd) : 0;
      if (sd > worst_sd) worst_sd = sd;
      checks += 3;
      if (cnt[i] != M) failures++;
      // results are floor or ceil of x, ceil with probability f: binomial bound
      tol = (5.0 * $sqrt(M * f * (1 - f)) + 2.0) / M;
      if (mean - x > tol || x - mean > tol) begin
        failures++; $display("interval %0d: mean %f expected %f", i, mean, x);
      end
      if (sd > 0.5 + 1e-9) begin
        failures++; $display("interval %0d: sd %f expected %f", i, sd, $sqrt(f * (1 - f)));
      end
    end
    $display("fine sweep: worst std. dev. %0.3f LSB, rms error %0.3f LSB over %0d results",
             worst_sd, $sqrt(err2 / nerr), nerr);

    // ---- part B ----
    for (int rep = 0; rep < 2; rep++) begin
      for (int c = 0; c < NCH; c++) begin
        xi[c] = -1;
        xs[c] = long_x[c] + longint'($urandom % D);
      end
      event_at(time'(xs[NCH-1]) + 20 * T);
    end
    checks++;
    if (n_b != 2 * NCH) begin failures++; $display("long intervals: %0d results", n_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_until(time'(2 * NX * M / NCH * 16) * T + 64'd20_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
