// tb_data_processor: random entries and common times in all three modes
// (disabled, common start, common stop); expected times are computed in
// integer arithmetic modulo 2^23.
module tb_data_processor;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  ram_entry_t entry;
  logic [TIME_W-1:0] com_time, lead_time, trail_time;
  logic enable, common_stop, lead_v, trail_v;
  int checks = 0, failures = 0;

  data_processor dut (.*);

  function automatic longint expect_t(longint abs_t, longint com, logic en, logic stop);
    longint r;
    if (!en) r = abs_t;
    else if (stop) r = com - abs_t;
    else r = abs_t - com;
    return ((r % (1 << TIME_W)) + (1 << TIME_W)) % (1 << TIME_W);
  endfunction

  initial begin
    for (int n = 0; n < 6000; n++) begin
      longint la, ta;
      entry = ram_entry_t'({$urandom, $urandom});
      com_time = TIME_W'($urandom);
      enable = (n % 3 != 0);
      common_stop = (n % 3 == 2);
      #1;
      la = longint'(entry.coarse) * 16 + longint'(entry.code.lead_pos);
      ta = longint'(entry.coarse) * 16 + longint'(entry.code.trail_pos);
      checks++;
      if (lead_v != entry.code.lead_v || trail_v != entry.code.trail_v ||
          longint'(lead_time) != expect_t(la, longint'(com_time), enable, common_stop) ||
          longint'(trail_time) != expect_t(ta, longint'(com_time), enable, common_stop)) begin
        failures++;
        $display("n=%0d lead=%h trail=%h", n, lead_time, trail_time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
