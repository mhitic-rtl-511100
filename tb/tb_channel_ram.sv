// tb_channel_ram: random writes and pops against a bench queue; checks the
// head entry, empty/full, drop-on-full with the sticky overflow flag, and clear.
module tb_channel_ram;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DEPTH = 32, WIDTH = 29;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic wr_en = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [WIDTH-1:0] q[$];
  logic ovf_ref = 1'b0;
  int checks = 0, failures = 0, n_ovf = 0;

  channel_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic cyc(input logic w, input logic p);
    wr_en = w; pop = p && !empty; wr_data = WIDTH'($urandom);
    #1;
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || overflow != ovf_ref ||
        (q.size() > 0 && rd_data != q[0])) begin
      failures++;
      $display("size=%0d empty=%b full=%b ovf=%b head=%h", q.size(), empty, full, overflow, rd_data);
    end
    @(posedge clk);
    // a write is refused when full at the clock edge, even with a pop
    begin
      bit was_full;
      was_full = (q.size() == DEPTH);
      if (pop) void'(q.pop_front());
      if (wr_en) begin
        if (!was_full) q.push_back(wr_data);
        else begin ovf_ref = 1'b1; n_ovf++; end
      end
    end
    #1;
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int phase;
      phase = (n / 500) % 3;
      if (phase == 0) cyc($urandom % 4 != 0, $urandom % 4 == 0);
      else if (phase == 1) cyc($urandom % 4 == 0, $urandom % 4 != 0);
      else cyc($urandom % 2 == 0, $urandom % 2 == 0);
      if (n == 2600) begin
        clear = 1; @(posedge clk); #1; clear = 0;
        q.delete(); ovf_ref = 0;
      end
    end
    checks++; if (n_ovf == 0) begin failures++; $display("overflow never exercised"); end
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
