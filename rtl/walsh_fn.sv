// walsh_fn: value of sequency-ordered Walsh function i at time sample t.
//
// Walsh function i, sampled at 2**P points, has the value
//   W(i,t) = prod_{r=0}^{P-1} (-1)^( t[P-1-r] * (n[r] + n[r+1]) ),  n[P] = 0,
// where n is the binary index. With logic 0 standing for +1 and logic 1 for -1
// the product becomes an exclusive-or: g = i ^ (i >> 1) is the Gray code of i,
// and W is the XOR of the bits t[P-1-r] for which g[r] is set, i.e. the parity
// of g AND (t bit-reversed). This is the construction of the ESTAR WFG W(i,t)
// subcircuit; only the packaging as a P-wide AND/XOR tree is this design's.
//
// Interface: idx (i) and t are P bits; w is the Walsh value (0 = +1, 1 = -1).
// Timing: purely combinational.
module walsh_fn #(
  parameter int unsigned P = wfg_pkg::IDX_BITS
) (
  input  logic [P-1:0] idx,
  input  logic [P-1:0] t,
  output logic         w
);
  logic [P-1:0] gray;
  logic [P-1:0] t_rev;

  assign gray = idx ^ (idx >> 1);

  always_comb begin
    for (int unsigned r = 0; r < P; r++) t_rev[r] = t[P-1-r];
  end

  assign w = ^(gray & t_rev);
endmodule
