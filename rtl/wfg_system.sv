// wfg_system: the distributed ESTAR Walsh function generator.
//
// The WFG is spread over the arms of the cross-shaped antenna array as
// N_CHIPS identical subcircuits (four in ESTAR), so each arm gets its Walsh
// lines from a nearby chip. All chips share the single Walsh clock and reset sent
// by the central processor, which keeps their functions in step; each chip's
// range pins select a different block of 32 functions, so four chips give 128
// mutually orthogonal functions out of the 256 the index width allows.
//
// Follows the ESTAR WFG: the number of subcircuits and the shared clock. This
// design's choices: a shared reset, and each chip's range, TEST_EN and
// TDATA_OUT brought out separately.
//
// Interface: s[c] is chip c's range (S2..S0); walshout[c][k] is W(32*s[c]+k, t),
// 0 = +1, 1 = -1; test_en[c] / tdata_out[c] are chip c's test pins.
// Timing: as wfg_chip; all chips update on the same falling clock edges.
module wfg_system #(
  parameter int unsigned N_CHIPS = 4,
  localparam int unsigned S_BITS = wfg_pkg::SEL_BITS,
  localparam int unsigned N      = wfg_pkg::NUM_FUNCS
) (
  input  logic                           clock,
  input  logic                           master_reset_n,
  input  logic [N_CHIPS-1:0][S_BITS-1:0] s,
  input  logic [N_CHIPS-1:0]             test_en,
  output logic [N_CHIPS-1:0][N-1:0]      walshout,
  output logic [N_CHIPS-1:0]             tdata_out
);
  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    wfg_chip u_chip (
      .clock         (clock),
      .master_reset_n(master_reset_n),
      .s             (s[c]),
      .test_en       (test_en[c]),
      .walshout      (walshout[c]),
      .tdata_out     (tdata_out[c])
    );
  end
endmodule
