// tb_coarse_counter: checks count and count_prev against a bench counter over
// a run that crosses the 2^19 wrap-around, and checks reset.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 19;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] count, count_prev;
  int checks = 0, failures = 0;
  longint ref_cnt;

  coarse_counter #(.COARSE_W(W)) dut (.clk(clk), .rst(rst), .count(count), .count_prev(count_prev));
  always #5 clk = ~clk;

  initial begin
    @(posedge clk); @(posedge clk); #1;
    checks++; if (count != 0 || count_prev != '1) failures++;
    rst = 1'b0;
    ref_cnt = 0;
    for (int n = 0; n < (1 << W) + 300; n++) begin
      @(posedge clk); #1;
      ref_cnt++;
      if (n < 200 || n > (1 << W) - 200) begin
        checks++;
        if (count != W'(ref_cnt) || count_prev != W'(ref_cnt - 1)) begin
          failures++;
          $display("n=%0d count=%0d prev=%0d", n, count, count_prev);
        end
      end
    end
    rst = 1'b1; @(posedge clk); #1;
    checks++; if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * ((1 << W) + 1000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
