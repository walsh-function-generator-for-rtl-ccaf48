// wfg_data_reg: output holding register of the WFG.
//
// Drives the WALSHOUT lines. It loads a whole group of N Walsh values when ld
// (DATA_LD) is high and otherwise keeps its value, so the outputs stay steady
// while the next group is being shifted in. Here the load is a synchronous
// enable on the common clock, and reset clears the register; both are this
// design's choices.
//
// Interface: ld load enable, d parallel data, q outputs.
// Timing: q takes d on the rising clk edge where ld is high.
module wfg_data_reg #(
  parameter int unsigned N = wfg_pkg::NUM_FUNCS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end
endmodule
