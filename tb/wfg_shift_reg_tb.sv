// wfg_shift_reg_tb: checks the serial-in shift register.
//
// Shifts in 2000 random bits and keeps its own record of them. Before each edge
// q_next must be {din, last 31 bits in order}, and sout must be the bit shifted
// in 32 clocks earlier (0 while the register still holds its reset value). It
// also checks that reset clears the register.
module wfg_shift_reg_tb;
  localparam int N = 32;
  logic         clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic         sout;
  logic [N-1:0] q_next, expect_next;
  bit           hist [$];
  int           checks = 0, failures = 0;

  wfg_shift_reg dut (.clk(clk), .rst_n(rst_n), .din(din), .sout(sout), .q_next(q_next));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int k = 0; k < N; k++) hist.push_back(1'b0);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din = 1'($urandom);
      #1;
      // Model: hist holds the last N bits, oldest first.
      for (int k = 0; k < N - 1; k++) expect_next[k] = hist[hist.size() - (N - 1) + k];
      expect_next[N-1] = din;
      checks++;
      if (q_next !== expect_next) begin
        failures++;
        if (failures < 10) $display("FAIL q_next %h expected %h", q_next, expect_next);
      end
      checks++;
      if (sout !== hist[hist.size() - N]) begin
        failures++;
        if (failures < 10) $display("FAIL sout at bit %0d", n);
      end
      @(posedge clk);
      hist.push_back(din);
    end
    @(negedge clk) rst_n = 1'b0;
    din = 1'b0;
    #1;
    checks++;
    if (q_next !== '0 || sout !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
