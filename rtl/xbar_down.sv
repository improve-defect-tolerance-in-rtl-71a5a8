// Crossbar down (downward mini switch box) of the cluster.
//
// Each crossbar down serves one input pin of every CLB: it holds one 9:1
// multiplexer per CLB (ten in all), each able to pick any of the crossbar's
// 6 cluster inputs or 3 feedbacks, so the crossbar is fully populated.
// Multiplexer input order is {feedbacks, cluster inputs}: indices 0..5 are
// the cluster inputs, 6..8 the feedbacks (this ordering is our choice).
//
// Every multiplexer carries the stuck-open defect-injection pins of cfg_mux.
// Timing: purely combinational.
module xbar_down #(
  parameter int unsigned N_IN  = moc_pkg::IN_PER_XDN,
  parameter int unsigned N_FB  = moc_pkg::FB_PER_XDN,
  parameter int unsigned N_MUX = moc_pkg::N_CLB,
  localparam int unsigned NI   = N_IN + N_FB,
  localparam int unsigned SW   = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic [N_IN-1:0]            cin,        // cluster inputs of this crossbar
  input  logic [N_FB-1:0]            fb,         // feedbacks from the cluster outputs
  input  logic [N_MUX-1:0][SW-1:0]   sel,        // configuration, one select per multiplexer
  input  logic [N_MUX-1:0]           defect,     // fault injection
  input  logic [N_MUX-1:0]           defect_val,
  output logic [N_MUX-1:0]           out         // out[j] drives one input pin of CLB j
);
  logic [NI-1:0] mux_in;
  assign mux_in = {fb, cin};

  for (genvar j = 0; j < N_MUX; j++) begin : g_mux
    cfg_mux #(.N(NI)) u_mux (
      .in(mux_in), .sel(sel[j]), .defect(defect[j]),
      .defect_val(defect_val[j]), .out(out[j])
    );
  end
endmodule
