// wfg_system_tb: end-to-end test of the distributed Walsh function generator.
//
// Runs the four-subcircuit system at its default size in two configurations,
// ranges {0,1,2,3} and then {4,5,6,7}, so all eight range settings are used.
// Each configuration is reset, initialised with 32 pulses and run for two full
// 8192-clock Walsh periods. The bench captures every 32-clock output group and
// checks:
//   - each output line against the Hadamard-based reference function;
//   - that the captured functions change sign exactly index times and are
//     pairwise orthogonal over one period, i.e. the cross term N_i N_j * sum W_i W_j
//     of a correlation vanishes, for all 128 lines together;
//   - that the second period repeats the first (8192-clock period);
//   - that the serial test stream of the chip in test mode reproduces its parallel
//     outputs in the documented order, while the other chips' TDATA_OUT stay 0;
//   - the update timing: outputs change only on every 32nd falling edge.
// It counts how often each mechanism happened (reset, initialisation, group
// update, period wrap, test read-out, range setting) and fails if any never did.
module wfg_system_tb;
  import walsh_ref_pkg::*;

  localparam int NC = 4;
  localparam int NF = 32;

  logic                      clock = 1'b1, master_reset_n = 1'b0;
  logic [NC-1:0][2:0]        s = '0;
  logic [NC-1:0]             test_en = '0;
  logic [NC-1:0][NF-1:0]     walshout, prev_out;
  logic [NC-1:0]             tdata_out;

  int checks = 0, failures = 0;
  int n_reset = 0, n_init = 0, n_update = 0, n_wrap = 0, n_test_bits = 0;
  bit range_used [8];

  bit [255:0] rows [NC*NF];   // captured functions of one run, first period
  bit [255:0] rows2 [NC*NF];  // second period
  bit [8191:0] stream;        // serial test data, one period

  wfg_system dut (
    .clock(clock), .master_reset_n(master_reset_n), .s(s), .test_en(test_en),
    .walshout(walshout), .tdata_out(tdata_out)
  );

  always #5 clock = ~clock;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [NC-1:0][2:0] sel, input int tchip);
    int edges = 2 * 8192 + 32;
    @(posedge clock);
    master_reset_n = 1'b0;
    s       = sel;
    test_en = '0;
    test_en[tchip] = 1'b1;
    #1;
    check(walshout == '0 && tdata_out == '0, "reset clears outputs");
    n_reset++;
    for (int c = 0; c < NC; c++) range_used[sel[c]] = 1'b1;
    #1 master_reset_n = 1'b1;
    prev_out = walshout;
    for (int n = 1; n <= edges; n++) begin
      @(posedge clock);
      if (walshout != prev_out) check(n % 32 == 0, $sformatf("update at edge %0d only on a 32-clock boundary", n));
      if (n == 32) n_init++;
      if (n >= 32 && n % 32 == 0) begin
        int t = (n / 32 - 1) % 256;
        n_update++;
        if (n > 32 && t == 0) n_wrap++;
        for (int c = 0; c < NC; c++)
          for (int k = 0; k < NF; k++) begin
            if (n / 32 - 1 < 256) rows[c*NF+k][t] = walshout[c][k];
            else if (n / 32 - 1 < 512) rows2[c*NF+k][t] = walshout[c][k];
          end
      end
      if (n >= 32 && n < 32 + 8192) begin
        stream[n - 32] = tdata_out[tchip];
        n_test_bits++;
      end
      for (int c = 0; c < NC; c++) if (c != tchip) check(tdata_out[c] == 1'b0, "TDATA_OUT low outside test mode");
      prev_out = walshout;
    end

    for (int c = 0; c < NC; c++)
      for (int k = 0; k < NF; k++) begin
        int i = 32 * sel[c] + k;
        int ch = 0;
        bit ok = 1'b1;
        for (int t = 0; t < 256; t++) if (rows[c*NF+k][t] != wal(i, t)) ok = 1'b0;
        check(ok, $sformatf("chip %0d line %0d is W(%0d,t)", c, k, i));
        for (int t = 1; t < 256; t++) if (rows[c*NF+k][t] != rows[c*NF+k][t-1]) ch++;
        check(ch == i, $sformatf("W(%0d) has %0d sign changes", i, ch));
        check(rows2[c*NF+k] == rows[c*NF+k], $sformatf("chip %0d line %0d repeats after 8192 clocks", c, k));
      end

    for (int a = 0; a < NC * NF; a++)
      for (int b = a + 1; b < NC * NF; b++) begin
        // sum over one period of W_a * W_b, with +1/-1 values
        int corr = 256 - 2 * $countones(rows[a] ^ rows[b]);
        check(corr == 0, $sformatf("lines %0d and %0d orthogonal (sum %0d)", a, b, corr));
      end

    for (int m = 0; m < 8192; m++)
      check(stream[m] == rows[tchip*NF + m % 32][m / 32],
            $sformatf("test stream bit %0d", m));
  endtask

  initial begin
    build();
    run({3'd3, 3'd2, 3'd1, 3'd0}, 0);
    run({3'd7, 3'd6, 3'd5, 3'd4}, 2);
    $display("mechanisms: resets=%0d initialisations=%0d group_updates=%0d period_wraps=%0d test_bits=%0d",
             n_reset, n_init, n_update, n_wrap, n_test_bits);
    check(n_reset > 0, "reset exercised");
    check(n_init > 0, "initialisation exercised");
    check(n_update > 0, "group update exercised");
    check(n_wrap > 0, "period wrap exercised");
    check(n_test_bits > 0, "test read-out exercised");
    for (int r = 0; r < 8; r++) check(range_used[r], $sformatf("range %0d used", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
