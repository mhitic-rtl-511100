// tb_delay_chain: checks that tap i of the delay-line model rises i stage
// delays after the reference clock, for every tap over several periods.
module tb_delay_chain;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned NTAP = 16;
  localparam int unsigned D    = 962;
  localparam int unsigned T    = NTAP * D;

  logic            clk = 1'b0;
  logic [NTAP-1:0] taps;
  int checks = 0, failures = 0;
  time t_clk;

  delay_chain #(.NTAP(NTAP), .TAP_DELAY_PS(D)) dut (.clk_ref(clk), .taps(taps));

  always #(T/2) clk = ~clk;
  always @(posedge clk) t_clk = $time;

  for (genvar i = 1; i < NTAP; i++) begin : g_mon
    always @(posedge taps[i]) begin
      if ($time > 2*T) begin
        checks++;
        if ($time - t_clk != time'(i*D)) begin
          failures++;
          $display("tap %0d rose %0t after clock, expected %0d", i, $time - t_clk, i*D);
        end
      end
    end
  end

  initial begin
    #(20*T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(1000*T);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
