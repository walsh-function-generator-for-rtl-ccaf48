// wfg_counter: the WFG's 13-bit up counter and its five-input load gate.
//
// The counter runs freely from 0 to 2**(T_BITS+L_BITS)-1 and wraps. Its upper
// T_BITS bits are the time sample t; its lower L_BITS bits are the low part of
// the Walsh function index, so within one value of t it steps through the 32
// functions of the chip. group_last is the AND of the low bits: it is high while
// the last function of a group is computed, and enables the data-register load.
// Counter split and AND gate follow the ESTAR WFG; the asynchronous active-low
// reset to zero is this design's choice.
//
// Interface: t, lo are the count fields; group_last = &lo.
// Timing: one increment per rising clk edge; outputs come straight from the flops
// (group_last through one AND level).
module wfg_counter #(
  parameter int unsigned T_BITS = wfg_pkg::IDX_BITS,
  parameter int unsigned L_BITS = wfg_pkg::LO_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [T_BITS-1:0] t,
  output logic [L_BITS-1:0] lo,
  output logic              group_last
);
  logic [T_BITS+L_BITS-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign t          = count[T_BITS+L_BITS-1:L_BITS];
  assign lo         = count[L_BITS-1:0];
  assign group_last = &lo;
endmodule
