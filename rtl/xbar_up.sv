// Crossbar up (upward mini switch box) of the cluster.
//
// Twelve 10:1 multiplexers, each able to pick any of the 10 CLB outputs and
// drive one cluster output. Multiplexer k's select is a binary CLB index.
// Every multiplexer carries the stuck-open defect-injection pins of cfg_mux.
// Timing: purely combinational.
module xbar_up #(
  parameter int unsigned N_SRC = moc_pkg::N_CLB,
  parameter int unsigned N_MUX = moc_pkg::N_OUT,
  localparam int unsigned SW   = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic [N_SRC-1:0]          src,        // CLB outputs
  input  logic [N_MUX-1:0][SW-1:0]  sel,
  input  logic [N_MUX-1:0]          defect,     // fault injection
  input  logic [N_MUX-1:0]          defect_val,
  output logic [N_MUX-1:0]          out
);
  for (genvar k = 0; k < N_MUX; k++) begin : g_mux
    cfg_mux #(.N(N_SRC)) u_mux (
      .in(src), .sel(sel[k]), .defect(defect[k]),
      .defect_val(defect_val[k]), .out(out[k])
    );
  end
endmodule
