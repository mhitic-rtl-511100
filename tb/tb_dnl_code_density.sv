// tb_dnl_code_density: code-density measurement of differential
// non-linearity, with the delay-line model given a fixed stage mismatch.
//
// Hits uncorrelated with the clock are sent on all eight channels; each event
// has a common start at a random phase and one hit per channel a random
// 16..272 bins later. The run is made twice:
//  - processor disabled: the absolute times are histogrammed over an 8-bit
//    range (256 codes). Each code's share is its bin width, so the DNL repeats
//    every 16 codes and follows the stage errors: DNL(p) = w(p)/D - 1.
//  - processor enabled (common start): the start-relative times 16..271 are
//    histogrammed. Start and hit both fall on random phases, so the widths
//    average out: DNL(k) = sum_a e(a)*e(a+k) / (16*D^2) with e = w - D.
// The DNL is evaluated per position within the 16-code period (averaging the
// 16 periods of the 256 codes) and compared with these formulas; the enabled
// run must also have less than half the peak DNL of the disabled run.
module tb_dnl_code_density;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D   = 962;
  localparam int unsigned T   = NTAP * D;
  localparam int unsigned EVT = 32;      // clock periods per event
  localparam int          NEV = 12000;   // events per run (8 hits each)
  localparam int ERR [NTAP] = '{0, 150, -120, 60, -180, 90, 30, -60, 170, -140, 40, -90, 120, -30, -100, 80};

  logic clk = 1'b0, rst = 1'b1, com_in = 1'b0, dp_enable = 1'b0;
  logic [NCH-1:0] ch_in = '0;
  logic rd = 1'b0;
  logic [OUT_W-1:0] dout;
  logic dout_valid, pri_out, fifo_empty, fifo_full, com_valid;
  logic [NCH-1:0] ch_overflow;
  int checks = 0, failures = 0;
  int hist [256];
  int n_words = 0;
  real w [NTAP];
  real dnl_off [NTAP], dnl_on [NTAP];

  mhitic_top #(.STAGE_ERR_PS(ERR)) dut (
    .clk_ref(clk), .rst(rst), .clear(1'b0), .ch_in(ch_in), .com_in(com_in),
    .edge_sel(2'b01), .common_stop(1'b0), .dp_enable(dp_enable),
    .rd(rd), .dout(dout), .dout_valid(dout_valid), .pri_in(1'b0), .pri_out(pri_out),
    .fifo_empty(fifo_empty), .fifo_full(fifo_full), .ch_overflow(ch_overflow), .com_valid(com_valid));

  always #(T/2) clk = ~clk;

  always @(negedge clk) begin
    rd <= 1'b0;
    if (dout_valid) begin
      out_word_t o;
      int code;
      o = out_word_t'(dout);
      if (!dp_enable) code = int'(o.time_val % 256);
      else code = int'(o.time_val) - 16;
      if (code >= 0 && code < 256) begin hist[code]++; n_words++; end
      rd <= 1'b1;
    end
  end

  task automatic run();
    time base;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    n_words = 0;
    for (int e = 0; e < NEV; e++) begin
      time s;
      base = $time;
      s = base + time'($urandom % T);
      fork
        begin #(s - $time) com_in = 1'b1; #(3000) com_in = 1'b0; end
      join_none
      for (int c = 0; c < NCH; c++) begin
        time h;
        h = s + time'(16 * D + $urandom % (256 * D));
        fork
          automatic int cc = c;
          automatic time hh = h;
          begin #(hh - $time) ch_in[cc] = 1'b1; #(3000) ch_in[cc] = 1'b0; end
        join_none
      end
      #(EVT * T);
    end
  endtask

  // per-position DNL of the current histogram
  task automatic dnl_by_pos(output real d [NTAP]);
    real tot;
    tot = 0;
    for (int i = 0; i < 256; i++) tot += hist[i];
    for (int p = 0; p < NTAP; p++) begin
      real s;
      s = 0;
      for (int i = p; i < 256; i += NTAP) s += hist[i];
      d[p] = s / (tot / NTAP) - 1.0;
    end
  endtask

  initial begin
    real sum_e, pk_off, pk_on;
    // bin widths of the model: stage errors, the last bin takes up the rest
    sum_e = 0;
    for (int p = 1; p < NTAP; p++) begin w[p] = real'(D) + ERR[p]; sum_e += ERR[p]; end
    w[0] = real'(D) - sum_e;

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);

    dp_enable = 1'b0;
    run();
    dnl_by_pos(dnl_off);
    dp_enable = 1'b1;
    run();
    dnl_by_pos(dnl_on);

    pk_off = 0; pk_on = 0;
    for (int p = 0; p < NTAP; p++) begin
      real exp_off, exp_on;
      exp_off = w[p] / D - 1.0;
      exp_on = 0;
      for (int a = 0; a < NTAP; a++) exp_on += (w[a] - D) * (w[(a + p) % NTAP] - D);
      exp_on = exp_on / (NTAP * real'(D) * D);
      $display("pos %2d  DNL off %6.2f%% (model %6.2f%%)  on %6.2f%% (model %6.2f%%)",
               p, 100 * dnl_off[p], 100 * exp_off, 100 * dnl_on[p], 100 * exp_on);
      checks += 2;
      if (dnl_off[p] - exp_off > 0.05 || exp_off - dnl_off[p] > 0.05) failures++;
      if (dnl_on[p] - exp_on > 0.05 || exp_on - dnl_on[p] > 0.05) failures++;
      if (dnl_off[p] > pk_off) pk_off = dnl_off[p];
      if (-dnl_off[p] > pk_off) pk_off = -dnl_off[p];
      if (dnl_on[p] > pk_on) pk_on = dnl_on[p];
      if (-dnl_on[p] > pk_on) pk_on = -dnl_on[p];
    end
    $display("peak |DNL|: processor disabled %0.2f%%, enabled %0.2f%%; hits per run %0d",
             100 * pk_off, 100 * pk_on, n_words);
    checks++;
    if (!(pk_on < pk_off / 2)) failures++;
    checks++;
    if (n_words < NEV * NCH * 9 / 10) begin failures++; $display("hits lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(time'(3 * NEV * EVT) * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
