// tb_common_hit_register: random hit codes; the register must load
// {coarse, leading position} only on a leading edge, keep it otherwise, and
// drop valid on clear.
module tb_common_hit_register;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, hit = 1'b0;
  hit_code_t code = '0;
  logic [COARSE_W-1:0] coarse = '0;
  logic [TIME_W-1:0] com_time, ref_t = '0;
  logic valid, ref_v = 1'b0;
  int checks = 0, failures = 0;

  common_hit_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(posedge clk); @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 3000; n++) begin
      code = hit_code_t'($urandom);
      hit = code.lead_v | code.trail_v;
      coarse = COARSE_W'($urandom);
      clear = (n % 700 == 699);
      @(posedge clk); #1;
      if (clear) begin ref_v = 0; ref_t = '0; end
      else if (hit && code.lead_v) begin ref_v = 1; ref_t = {coarse, code.lead_pos}; end
      checks++;
      if (valid != ref_v || com_time != ref_t) begin
        failures++;
        $display("n=%0d valid=%b time=%h expected %b %h", n, valid, com_time, ref_v, ref_t);
      end
    end
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
