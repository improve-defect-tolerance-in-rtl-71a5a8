// Configurable N:1 routing multiplexer of the cluster local interconnect,
// with the defect model used to evaluate the redundancy schemes.
//
// In the SRAM-based FPGA every routing multiplexer is steered by
// configuration bits; here they arrive on `sel` (binary index, 0..N-1).
// A select value of N or above drives 0 (an unused multiplexer).
//
// Defect model: a manufacturing defect makes the multiplexer output
// undefined (stuck-open), so the multiplexer is unusable. A two-state
// simulation cannot hold an undefined value, so when `defect` is 1 the
// output follows `defect_val`, which a testbench drives with random bits.
// In silicon `defect` is tied to 0; it exists for fault-injection only.
// The binary select encoding and the defect port are this design's choices.
//
// Timing: purely combinational.
module cfg_mux #(
  parameter int unsigned N  = 9,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  in,
  input  logic [SW-1:0] sel,
  input  logic          defect,     // fault injection: output becomes undefined
  input  logic          defect_val, // value shown while defective
  output logic          out
);
  always_comb begin
    if (defect)                      out = defect_val;
    else if (32'(sel) < N)           out = in[sel];
    else                             out = 1'b0;
  end
endmodule
