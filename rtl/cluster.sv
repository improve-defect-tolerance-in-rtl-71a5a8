// One cluster of a SRAM-based Mesh-of-Clusters FPGA, with Upward Redundant
// Multiplexers (URM) protecting its crossbar up.
//
// Structure (defaults): 24 cluster inputs split into 4 groups of 6, one per
// crossbar down. Crossbar down d holds ten 9:1 multiplexers choosing among
// its 6 inputs and 3 feedbacks; multiplexer j drives input pin d of CLB j.
// The 10 CLB outputs enter the crossbar up (twelve 10:1 multiplexers) and the
// URMs; a 2:1 multiplexer per output selects crossbar up or URM. The 12
// cluster outputs are also the 12 feedbacks: outputs 3d..3d+2 return to
// crossbar down d (how feedbacks are tapped is our choice). Because a
// repaired output also feeds back, the URM protects the feedback path too.
//
// Configuration (the SRAM configuration memory) is presented as plain input
// ports; how it is stored and loaded is outside this block. Every crossbar
// multiplexer has a stuck-open defect-injection pin (defect_* and the value
// shown while defective); tie them to 0 in a real device.
//
// Timing: inputs to outputs are combinational through CLBs configured as
// combinational, and one cycle through CLBs configured as registered.
// Circuit note: feedbacks make a structural loop from the CLB outputs back
// to the CLB inputs, as in any FPGA routing fabric; a configuration must
// not close that loop through combinational CLBs only, and lint tools
// report the structural loop.
module cluster
  import moc_pkg::*;
#(
  parameter int unsigned P_N_CLB      = N_CLB,
  parameter int unsigned P_N_XDN      = N_XDN,
  parameter int unsigned P_IN_PER_XDN = IN_PER_XDN,
  parameter int unsigned P_FB_PER_XDN = FB_PER_XDN,
  parameter int unsigned P_N_OUT      = N_OUT,
  parameter int unsigned P_N_URM      = N_URM,
  localparam int unsigned N_CIN = P_N_XDN * P_IN_PER_XDN,
  localparam int unsigned NDI   = P_IN_PER_XDN + P_FB_PER_XDN,
  localparam int unsigned SWD   = (NDI > 1) ? $clog2(NDI) : 1,
  localparam int unsigned SWU   = (P_N_CLB > 1) ? $clog2(P_N_CLB) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [N_CIN-1:0]                       cin,
  output logic [P_N_OUT-1:0]                     cout,
  // configuration
  input  logic [P_N_XDN-1:0][P_N_CLB-1:0][SWD-1:0] cfg_dn_sel,
  input  logic [P_N_OUT-1:0][SWU-1:0]            cfg_up_sel,
  input  logic [P_N_URM-1:0][SWU-1:0]            cfg_urm_sel,
  input  logic [P_N_OUT-1:0]                     cfg_use_urm,
  input  clb_cfg_t [P_N_CLB-1:0]                 cfg_clb,
  // defect injection (stuck-open multiplexer outputs)
  input  logic [P_N_XDN-1:0][P_N_CLB-1:0]        defect_dn,
  input  logic [P_N_XDN-1:0][P_N_CLB-1:0]        defect_val_dn,
  input  logic [P_N_OUT-1:0]                     defect_up,
  input  logic [P_N_OUT-1:0]                     defect_val_up
);
  logic [P_N_XDN-1:0][P_N_CLB-1:0] dn_out;   // [crossbar][CLB]
  logic [P_N_CLB-1:0][P_N_XDN-1:0] clb_in;   // [CLB][pin]
  logic [P_N_CLB-1:0]              clb_out;
  logic [P_N_OUT-1:0]              up_out;
  logic [P_N_OUT-1:0]              fb;

  assign fb = cout;

  for (genvar d = 0; d < P_N_XDN; d++) begin : g_xdn
    xbar_down #(.N_IN(P_IN_PER_XDN), .N_FB(P_FB_PER_XDN), .N_MUX(P_N_CLB)) u_xdn (
      .cin       (cin[d*P_IN_PER_XDN +: P_IN_PER_XDN]),
      .fb        (fb[d*P_FB_PER_XDN +: P_FB_PER_XDN]),
      .sel       (cfg_dn_sel[d]),
      .defect    (defect_dn[d]),
      .defect_val(defect_val_dn[d]),
      .out       (dn_out[d])
    );
  end

  for (genvar c = 0; c < P_N_CLB; c++) begin : g_clb
    for (genvar d = 0; d < P_N_XDN; d++) begin : g_pin
      assign clb_in[c][d] = dn_out[d][c];
    end
    clb u_clb (
      .clk(clk), .rst_n(rst_n), .in(clb_in[c]), .cfg(cfg_clb[c]), .out(clb_out[c])
    );
  end

  xbar_up #(.N_SRC(P_N_CLB), .N_MUX(P_N_OUT)) u_xup (
    .src(clb_out), .sel(cfg_up_sel), .defect(defect_up),
    .defect_val(defect_val_up), .out(up_out)
  );

  urm #(.N_SRC(P_N_CLB), .N_OUT(P_N_OUT), .N_URM(P_N_URM)) u_urm (
    .src(clb_out), .xbar_out(up_out), .urm_sel(cfg_urm_sel),
    .use_urm(cfg_use_urm), .out(cout)
  );

  initial begin
    assert (P_N_XDN == CLB_K)
      else $error("cluster: one crossbar down per CLB input pin is required");
    assert (P_N_XDN * P_FB_PER_XDN == P_N_OUT)
      else $error("cluster: feedbacks are the cluster outputs, so N_XDN*FB_PER_XDN must equal N_OUT");
  end
endmodule
