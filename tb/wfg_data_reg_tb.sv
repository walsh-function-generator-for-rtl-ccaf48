// wfg_data_reg_tb: checks the output holding register.
//
// Drives random data with a random load enable for 2000 clocks and checks that
// q follows d only on edges where ld is high and holds otherwise, and that reset
// clears it.
module wfg_data_reg_tb;
  localparam int N = 32;
  logic         clk = 1'b0, rst_n = 1'b0, ld = 1'b0;
  logic [N-1:0] d = '0, q, model;
  int           checks = 0, failures = 0, loads = 0;

  wfg_data_reg dut (.clk(clk), .rst_n(rst_n), .ld(ld), .d(d), .q(q));

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
    #1;
    checks++;
    if (q !== '0) failures++;
    model = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      d  = $urandom;
      ld = ($urandom % 4) == 0;
      @(posedge clk);
      if (ld) begin
        model = d;
        loads++;
      end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL q %h expected %h (ld=%0d)", q, model, ld);
      end
    end
    checks++;
    if (loads == 0) failures++;
    @(negedge clk) rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
