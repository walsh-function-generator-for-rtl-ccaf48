// walsh_fn_tb: exhaustive check of the W(i,t) circuit.
//
// Applies all 65536 (i, t) pairs and compares w with the Hadamard-based
// reference of walsh_ref_pkg. Also checks, from the circuit's own outputs, that
// function i has exactly i sign changes over t and that every pair of distinct
// functions is orthogonal over one period (the property the noise cancellation
// rests on).
module walsh_fn_tb;
  import walsh_ref_pkg::*;

  logic [7:0] idx, t;
  logic       w;
  int         checks = 0, failures = 0;
  bit [255:0] rows [256];

  walsh_fn dut (.idx(idx), .t(t), .w(w));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    for (int i = 0; i < 256; i++) begin
      for (int tt = 0; tt < 256; tt++) begin
        idx = 8'(i);
        t   = 8'(tt);
        #1;
        rows[i][tt] = w;
        checks++;
        if (w !== wal(i, tt)) begin
          failures++;
          if (failures < 10) $display("mismatch W(%0d,%0d) = %0d, expected %0d", i, tt, w, wal(i, tt));
        end
      end
    end
    // Sequency: function i changes sign i times.
    for (int i = 0; i < 256; i++) begin
      int ch;
      ch = 0;
      for (int tt = 1; tt < 256; tt++) if (rows[i][tt] != rows[i][tt-1]) ch++;
      checks++;
      if (ch != i || rows[i][0] != 1'b0) begin
        failures++;
        $display("function %0d has %0d sign changes", i, ch);
      end
    end
    // Orthogonality: distinct functions agree on exactly half the samples.
    for (int i = 0; i < 256; i++)
      for (int j = i + 1; j < 256; j++) begin
        checks++;
        if ($countones(rows[i] ^ rows[j]) != 128) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
