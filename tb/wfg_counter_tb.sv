// wfg_counter_tb: checks the 13-bit counter and its group-end AND gate.
//
// Holds reset, then runs one and a half counter periods, comparing t, lo and
// group_last with a model count every cycle, and checking that the count wraps
// after exactly 8192 clocks and that group_last is high once every 32 clocks.
// Finally an asynchronous reset mid-count must clear the counter at once.
module wfg_counter_tb;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] t;
  logic [4:0] lo;
  logic       group_last;
  int         checks = 0, failures = 0;
  int         model, last_count, wraps;

  wfg_counter dut (.clk(clk), .rst_n(rst_n), .t(t), .lo(lo), .group_last(group_last));

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at model count %0d (t=%0d lo=%0d gl=%0d)", what, model, t, lo, group_last);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check({t, lo} == 13'd0, "reset value");
    @(negedge clk) rst_n = 1'b1;
    model = 0; last_count = 0; wraps = 0;
    for (int n = 0; n < 8192 + 4096; n++) begin
      @(posedge clk); #1;
      model = (model + 1) % 8192;
      check({t, lo} == 13'(model), "count");
      check(group_last == ((model % 32) == 31), "group_last");
      if (group_last) last_count++;
      if (model == 0) begin
        wraps++;
        check(n + 1 == 8192, "wrap after 8192 clocks");
      end
    end
    check(wraps == 1, "one wrap");
    check(last_count == (8192 + 4096) / 32, "group_last once per 32 clocks");
    // Asynchronous reset between clock edges.
    @(negedge clk); #2 rst_n = 1'b0; #1;
    check({t, lo} == 13'd0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
