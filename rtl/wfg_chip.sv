// wfg_chip: one Walsh function generator subcircuit (one FPGA of the ESTAR WFG).
//
// Generates 32 consecutive sequency-ordered Walsh functions W(32*S+k, t),
// k = 0..31, where the range S = {S2,S1,S0} is strapped on three pins. A 13-bit
// counter scans the (index, time) pairs: its upper 8 bits are t, its lower 5 bits
// the low index bits, with S above them. For each count the combinational W(i,t)
// circuit produces one value, which enters a 32-bit shift register; when the 32nd
// value of a time sample enters (the five-input AND of the low count bits), the
// whole group is copied into the data register that drives WALSHOUT. The outputs
// therefore change every 32 clocks and repeat every 8192 clocks; with a clock of
// 8192/T the Walsh period equals the correlation period T.
//
// Reset is MASTER RESET, active low. After reset, 32 clock pulses initialise the
// outputs to W(.,0). In test mode (TEST_EN high) the serial end of the shift
// register appears on TDATA_OUT: after initialisation it shows W(32*S,0), and each
// falling CLOCK edge presents the next value, in order of increasing index within
// a time sample and increasing time between samples. Normal generation continues.
//
// Follows the ESTAR WFG: the block structure, counter split, range pins, 8192-clock
// period, 32-pulse initialisation, test read-out order and the falling active
// edge. This design's choices: every register changes on the falling CLOCK edge
// (the clock is inverted once here and distributed as aclk); the data register
// loads on the same edge as the last bit of a group enters the shift register;
// TDATA_OUT is 0 when TEST_EN is low; reset is asynchronous.
//
// Timing: WALSHOUT and TDATA_OUT change only on falling CLOCK edges. The first
// group appears on WALSHOUT at the 32nd falling edge after reset; group t appears
// at falling edge 32*(t+1) (mod 8192) and holds for 32 clocks.
module wfg_chip #(
  parameter int unsigned P      = wfg_pkg::IDX_BITS,
  parameter int unsigned L_BITS = wfg_pkg::LO_BITS,
  localparam int unsigned S_BITS = P - L_BITS,
  localparam int unsigned N      = 1 << L_BITS
) (
  input  logic              clock,
  input  logic              master_reset_n,
  input  logic [S_BITS-1:0] s,
  input  logic              test_en,
  output logic [N-1:0]      walshout,
  output logic              tdata_out
);
  logic              aclk;
  logic [P-1:0]      t;
  logic [L_BITS-1:0] lo;
  logic              group_last;
  logic              w;
  logic              sr_out;
  logic [N-1:0]      sr_next;

  // Falling CLOCK edge is the active edge.
  assign aclk = ~clock;

  wfg_counter #(.T_BITS(P), .L_BITS(L_BITS)) u_counter (
    .clk       (aclk),
    .rst_n     (master_reset_n),
    .t         (t),
    .lo        (lo),
    .group_last(group_last)
  );

  walsh_fn #(.P(P)) u_walsh (
    .idx({s, lo}),
    .t  (t),
    .w  (w)
  );

  wfg_shift_reg #(.N(N)) u_shift (
    .clk   (aclk),
    .rst_n (master_reset_n),
    .din   (w),
    .sout  (sr_out),
    .q_next(sr_next)
  );

  wfg_data_reg #(.N(N)) u_data (
    .clk  (aclk),
    .rst_n(master_reset_n),
    .ld   (group_last),
    .d    (sr_next),
    .q    (walshout)
  );

  assign tdata_out = test_en & sr_out;
endmodule
