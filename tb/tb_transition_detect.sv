// tb_transition_detect: random and hand-picked sample words in every edge
// mode; the expected code is found by scanning the 17 samples (previous last
// sample + word) from the earliest phase for the first 0->1 and 1->0 steps.
module tb_transition_detect;
  import mhitic_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  logic [NTAP-1:0] word = '0;
  edge_sel_e esel = EDGE_BOTH;
  logic hit;
  hit_code_t code;
  int checks = 0, failures = 0;
  logic last = 1'b0;

  transition_detect dut (.clk(clk), .rst(rst), .word(word), .edge_sel(esel), .hit(hit), .code(code));
  always #5 clk = ~clk;

  task automatic check_now();
    hit_code_t e;
    logic p;
    e = '0;
    p = last;
    for (int i = 0; i < NTAP; i++) begin
      if (!p && word[i] && !e.lead_v && esel[0]) begin e.lead_v = 1; e.lead_pos = 4'(i); end
      if (p && !word[i] && !e.trail_v && esel[1]) begin e.trail_v = 1; e.trail_pos = 4'(i); end
      p = word[i];
    end
    checks++;
    if (code !== e || hit !== (e.lead_v | e.trail_v)) begin
      failures++;
      $display("word=%h last=%b sel=%0d code=%h expected %h", word, last, esel, code, e);
    end
  endtask

  task automatic apply(input logic [NTAP-1:0] w);
    word = w; #1; check_now();
    @(posedge clk); last = w[NTAP-1]; #1;
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1; rst = 0;
    esel = EDGE_BOTH;
    apply(16'h0000); apply(16'h0010); apply(16'hFFF0); apply(16'h0000);
    apply(16'h8000); apply(16'h0001); apply(16'h0F0F); apply(16'hFFFF);
    for (int m = 1; m < 4; m++) begin
      esel = edge_sel_e'(m);
      for (int n = 0; n < 3000; n++) begin
        if ($urandom % 2) apply(16'($urandom));
        else apply(16'(((1 << ($urandom % 17)) - 1) ^ ($urandom % 2 ? 16'hFFFF : 16'h0)));
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
