// wfg_shift_reg: serial-in, parallel-out shift register for one group of Walsh values.
//
// Every clock one new bit din enters at the top (bit N-1) and all bits move one
// place towards bit 0. After N shifts, bit k holds the k-th bit shifted in, so a
// group computed in order of increasing index lands with index k at bit k, and
// q[0] is the oldest bit: the serial output used for test read-out. q_next is the
// content after the coming edge, which lets the data register capture a group on
// the same edge as its last bit arrives. Reset clears the register (this design's
// choice).
//
// Interface: din serial in; sout = q[0] serial out; q_next = {din, q[N-1:1]}.
// Timing: shifts on every rising clk edge.
module wfg_shift_reg #(
  parameter int unsigned N = wfg_pkg::NUM_FUNCS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         din,
  output logic         sout,
  output logic [N-1:0] q_next
);
  logic [N-1:0] q;

  assign q_next = {din, q[N-1:1]};
  assign sout   = q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end
endmodule
