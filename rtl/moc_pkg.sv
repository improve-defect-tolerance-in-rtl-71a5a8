// Shared constants and types of the Mesh-of-Clusters cluster.
//
// The numbers are the cluster used for evaluation: 10 CLBs of 4 inputs,
// 4 crossbars down with 6 cluster inputs and 3 feedbacks each (ten 9:1
// multiplexers per crossbar), one crossbar up of twelve 10:1 multiplexers
// driving 12 cluster outputs. The CLB configuration layout (a 16-bit truth
// table plus a register-enable bit) is this design's own choice.
package moc_pkg;
  localparam int unsigned N_CLB        = 10; // CLBs per cluster
  localparam int unsigned CLB_K        = 4;  // inputs per CLB
  localparam int unsigned N_XDN        = 4;  // crossbars down (one per CLB input pin)
  localparam int unsigned IN_PER_XDN   = 6;  // cluster inputs per crossbar down
  localparam int unsigned FB_PER_XDN   = 3;  // feedbacks per crossbar down
  localparam int unsigned N_OUT        = 12; // cluster outputs = crossbar-up multiplexers
  localparam int unsigned N_URM        = 12; // upward redundant multiplexers (1..N_OUT)
  localparam int unsigned LUT_BITS     = 1 << CLB_K;

  // Configuration of one CLB.
  typedef struct packed {
    logic [LUT_BITS-1:0] lut;        // truth table: lut[i] is the output for inputs == i
    logic                registered; // 1: CLB output taken from its flip-flop
  } clb_cfg_t;
endpackage
