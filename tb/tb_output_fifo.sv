// tb_output_fifo: two FIFOs in a daisy chain (chip 0 first). Random writes and
// bus reads against bench queues; checks order, full/empty, that only the
// first chip holding data is selected, and that a read reaches only it.
module tb_output_fifo;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DEPTH = 512, WIDTH = 27;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, rd = 1'b0;
  logic [1:0] wr = '0, full, dv, empty, pri_out, sel;
  logic [WIDTH-1:0] din [2];
  logic [WIDTH-1:0] dout [2];
  logic [WIDTH-1:0] q [2][$];
  int checks = 0, failures = 0, n_full = 0, n_skip = 0;

  for (genvar k = 0; k < 2; k++) begin : g_chip
    output_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
      .clk(clk), .rst(rst), .clear(clear), .wr(wr[k]), .din(din[k]), .full(full[k]),
      .rd(rd), .dout(dout[k]), .dout_valid(dv[k]), .empty(empty[k]),
      .pri_in(k == 0 ? 1'b0 : pri_out[0]), .pri_out(pri_out[k]), .selected(sel[k]));
  end
  always #5 clk = ~clk;

  task automatic cyc(int pw0, int pw1, int prd);
    wr[0] = ($urandom % 100) < pw0; wr[1] = ($urandom % 100) < pw1;
    din[0] = WIDTH'($urandom); din[1] = WIDTH'($urandom);
    rd = ($urandom % 100) < prd;
    #1;
    for (int k = 0; k < 2; k++) begin
      logic exp_sel;
      exp_sel = (q[k].size() > 0) && (k == 0 || q[0].size() == 0);
      checks++;
      if (empty[k] != (q[k].size() == 0) || full[k] != (q[k].size() == DEPTH) ||
          dv[k] != exp_sel || (exp_sel && dout[k] != q[k][0])) begin
        failures++; $display("%0t chip %0d mismatch size=%0d", $time, k, q[k].size());
      end
    end
    if (q[0].size() == 0 && q[1].size() > 0) n_skip++;
    @(posedge clk);
    begin
      bit f0, f1;
      f0 = q[0].size() == DEPTH; f1 = q[1].size() == DEPTH;
      if (f0 || f1) n_full++;
      if (rd) begin
        if (q[0].size() > 0) void'(q[0].pop_front());
        else if (q[1].size() > 0) void'(q[1].pop_front());
      end
      if (wr[0] && !f0) q[0].push_back(din[0]);
      if (wr[1] && !f1) q[1].push_back(din[1]);
    end
    #1;
  endtask

  initial begin
    din[0] = '0; din[1] = '0;
    @(posedge clk); @(posedge clk); #1; rst = 0;
    repeat (1500) cyc(70, 60, 20);    // fill up to full
    repeat (3000) cyc(10, 20, 60);    // drain: chip 0 first, then chip 1
    repeat (1000) cyc(30, 30, 50);
    checks++; if (n_full == 0 || n_skip == 0) begin failures++; $display("full or skip not exercised"); end
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
