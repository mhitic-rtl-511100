// tb_sampling_cells: drives an input with edges at random picosecond times and
// checks every 16-bit word against the input level expected at each phase
// (phase i of the period starting at clock edge k is at k*T + i*D).
module tb_sampling_cells;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned NTAP = 16;
  localparam int unsigned D    = 962;
  localparam int unsigned T    = NTAP * D;
  localparam int unsigned NPER = 200;

  logic            clk = 1'b0;
  logic [NTAP-1:0] taps;
  logic            hit_in = 1'b0;
  logic [NTAP-1:0] word;
  int checks = 0, failures = 0;
  // level of the input at each phase of each period, computed by the bench
  logic [NTAP-1:0] expect_w [NPER+2];
  int k = 0;

  delay_chain #(.NTAP(NTAP), .TAP_DELAY_PS(D)) u_dl (.clk_ref(clk), .taps(taps));
  sampling_cells #(.NTAP(NTAP)) dut (.clk(clk), .taps(taps), .hit_in(hit_in), .word(word));

  // clock: first rising edge (period 0) at time T
  initial begin
    #(T/2);
    forever #(T/2) clk = ~clk;
  end

  // input: toggles at random times kept 100 ps away from any phase
  initial begin
    time t, tn;
    logic lvl;
    lvl = 1'b0;
    t = 0;
    for (int p = 0; p <= NPER + 1; p++) expect_w[p] = '0;
    while (t < time'((NPER + 1) * T)) begin
      tn = t + time'(100 + ($urandom % (3 * T)));
      if ((tn % D) < 100) tn += 100;
      if ((tn % D) > D - 100) tn += 200;
      #(tn - t);
      t = tn;
      lvl = ~lvl;
      hit_in = lvl;
    end
  end

  // reference: record the input at every phase time
  initial begin
    #(T);
    for (int p = 0; p <= NPER; p++)
      for (int i = 0; i < NTAP; i++) begin
        #(i == 0 ? 0 : D);
        expect_w[p][i] = hit_in;
        if (i == NTAP - 1) #(D);
      end
  end

  // the word seen after clock edge p+1 holds period p
  always @(posedge clk) begin
    #(1);
    if (k >= 1 && k <= NPER) begin
      checks++;
      if (word !== expect_w[k-1]) begin
        failures++;
        $display("period %0d: word %h expected %h", k-1, word, expect_w[k-1]);
      end
    end
    k++;
  end

  initial begin
    #((NPER + 3) * T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #((NPER + 100) * T);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
