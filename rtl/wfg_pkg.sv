// wfg_pkg: sizes shared by the Walsh function generator.
//
// One generator subcircuit produces NUM_FUNCS = 2**LO_BITS consecutive Walsh
// functions out of 2**IDX_BITS, sampled at 2**IDX_BITS time points per period.
// An (IDX_BITS + LO_BITS)-bit counter walks through all (index, time) pairs, so
// one period takes 2**13 = 8192 clocks. The numbers are those of the ESTAR WFG:
// 8-bit index and time, 32 functions per chip, 3 range-select pins.
package wfg_pkg;
  localparam int unsigned IDX_BITS  = 8;                   // bits of i and of t
  localparam int unsigned LO_BITS   = 5;                   // index bits from the counter
  localparam int unsigned SEL_BITS  = IDX_BITS - LO_BITS;  // S2..S0
  localparam int unsigned NUM_FUNCS = 1 << LO_BITS;        // 32 outputs per chip
endpackage
