// Upward Redundant Multiplexers (URM): spare multiplexers in parallel with
// the crossbar up.
//
// Each URM is a 10:1 multiplexer over the same CLB outputs as the crossbar
// up. Every cluster output gets one extra 2:1 multiplexer that passes either
// its crossbar-up multiplexer or a URM output, so a defective crossbar-up
// multiplexer is bypassed by configuring a URM with the select it would have
// had. One URM repairs one crossbar-up multiplexer; N_URM sets the
// trade-off between tolerated defects and area (1..N_OUT).
//
// With fewer URMs than outputs, output k is paired with URM (k mod N_URM);
// this sharing rule is our choice. As for the evaluated cluster, the URMs
// and the 2:1 multiplexers are taken as fault-free (no defect pins).
// Timing: purely combinational.
module urm #(
  parameter int unsigned N_SRC = moc_pkg::N_CLB,
  parameter int unsigned N_OUT = moc_pkg::N_OUT,
  parameter int unsigned N_URM = moc_pkg::N_URM,
  localparam int unsigned SW   = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic [N_SRC-1:0]          src,      // CLB outputs
  input  logic [N_OUT-1:0]          xbar_out, // crossbar-up multiplexer outputs
  input  logic [N_URM-1:0][SW-1:0]  urm_sel,  // configuration of each URM
  input  logic [N_OUT-1:0]          use_urm,  // configuration of each output 2:1 mux
  output logic [N_OUT-1:0]          out       // cluster outputs
);
  logic [N_URM-1:0] urm_out;

  for (genvar u = 0; u < N_URM; u++) begin : g_urm
    cfg_mux #(.N(N_SRC)) u_mux (
      .in(src), .sel(urm_sel[u]), .defect(1'b0), .defect_val(1'b0), .out(urm_out[u])
    );
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    assign out[k] = use_urm[k] ? urm_out[k % N_URM] : xbar_out[k];
  end

  initial begin
    assert (N_URM >= 1 && N_URM <= N_OUT)
      else $error("urm: N_URM must lie in 1..N_OUT");
  end
endmodule
