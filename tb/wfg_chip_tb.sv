// wfg_chip_tb: checks one WFG subcircuit against the reference Walsh functions.
//
// CLOCK runs freely; the chip acts on its falling edges and the bench samples on
// the rising edges in between. After falling edge n since reset:
//   WALSHOUT[k] = 0 for n < 32, else W(32*S + k, (n/32 - 1) mod 256);
//   TDATA_OUT   = 0 without TEST_EN or for n < 32,
//                 else W(32*S + (n-32) mod 32, ((n-32)/32) mod 256),
// which is the read-out order of test mode: W(0,0), W(1,0), ..., W(31,0), W(0,1)...
// Run 1: range S=5 in test mode for two full 8192-clock periods. Run 2: range
// S=0, normal mode, one period. The bench also checks that WALSHOUT changes only
// every 32 clocks and that the first valid group appears after exactly 32 pulses.
module wfg_chip_tb;
  import walsh_ref_pkg::*;

  logic        clock = 1'b1, master_reset_n = 1'b0, test_en = 1'b0;
  logic [2:0]  s = '0;
  logic [31:0] walshout, prev_out, expect_out;
  logic        tdata_out, expect_td;
  int          checks = 0, failures = 0, changes = 0;

  wfg_chip dut (
    .clock(clock), .master_reset_n(master_reset_n), .s(s), .test_en(test_en),
    .walshout(walshout), .tdata_out(tdata_out)
  );

  always #5 clock = ~clock;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [2:0] sel, input logic ten, input int edges);
    @(posedge clock);
    master_reset_n = 1'b0;
    s       = sel;
    test_en = ten;
    #1;
    checks++;
    if (walshout !== '0 || tdata_out !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    #1 master_reset_n = 1'b1;
    prev_out = walshout;
    for (int n = 1; n <= edges; n++) begin
      @(posedge clock);
      if (n < 32) begin
        expect_out = '0;
        expect_td  = 1'b0;
      end else begin
        for (int k = 0; k < 32; k++) expect_out[k] = wal(32 * sel + k, (n / 32 - 1) % 256);
        expect_td = ten & wal(32 * sel + (n - 32) % 32, ((n - 32) / 32) % 256);
      end
      checks++;
      if (walshout !== expect_out) begin
        failures++;
        if (failures < 10) $display("FAIL S=%0d edge %0d walshout %h expected %h", sel, n, walshout, expect_out);
      end
      checks++;
      if (tdata_out !== expect_td) begin
        failures++;
        if (failures < 10) $display("FAIL S=%0d edge %0d tdata_out %0d expected %0d", sel, n, tdata_out, expect_td);
      end
      if (walshout !== prev_out) begin
        changes++;
        checks++;
        if (n % 32 != 0) begin
          failures++;
          $display("FAIL walshout changed at edge %0d, not a multiple of 32", n);
        end
      end
      prev_out = walshout;
    end
  endtask

  initial begin
    build();
    run(3'd5, 1'b1, 2 * 8192 + 64);
    run(3'd0, 1'b0, 8192 + 64);
    checks++;
    if (changes < 256) begin
      failures++;
      $display("FAIL only %0d output updates seen", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
