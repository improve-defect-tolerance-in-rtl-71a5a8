// Configurable logic block (CLB) with 4 inputs.
//
// A 4-input look-up table whose 16-bit truth table comes from the
// configuration, followed by a flip-flop; a configuration bit chooses
// whether the CLB output is the LUT output (combinational) or the
// flip-flop. The cluster has 10 such CLBs with 4 inputs each; the LUT plus
// flip-flop structure is the usual one and is our choice.
//
// Timing: the flip-flop samples the LUT on the rising edge of clk and is
// cleared by the active-low asynchronous reset rst_n.
module clb
  import moc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CLB_K-1:0] in,
  input  clb_cfg_t         cfg,
  output logic             out
);
  logic lut_o, q;

  assign lut_o = cfg.lut[in];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= lut_o;
  end

  assign out = cfg.registered ? q : lut_o;
endmodule
