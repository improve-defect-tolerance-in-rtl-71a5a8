// End-to-end testbench for the cluster at its default size (10 CLBs,
// 4 crossbars down of ten 9:1 multiplexers, 24 inputs, 12 outputs,
// 12 feedbacks, 12 URMs).
//
// A random "application" is placed on the cluster: random truth tables,
// a mix of combinational and registered CLBs, random routing through the
// crossbars down (cluster inputs and feedbacks) and the crossbar up.
// Feedbacks are only routed from registered CLBs, so no configuration
// closes a combinational loop. An independent cycle model of the cluster
// predicts every output on every cycle. Phases:
//   1. fault-free operation;
//   2. stuck-open defects on crossbar-up multiplexers, not repaired: the
//      outputs must follow the defect model and differ from the fault-free
//      application at least once;
//   3. the same defects bypassed by URMs: outputs must equal the fault-free
//      application again, including outputs that are fed back;
//   4. all 12 crossbar-up multiplexers defective and all bypassed;
//   5. stuck-open defects on crossbar-down multiplexers (which URMs do not
//      cover): outputs must follow the defect model.
// Every mechanism is counted, and one that never happened counts as a failure.
module cluster_tb;
  import moc_pkg::*;
  localparam int unsigned NCIN = N_XDN * IN_PER_XDN;
  localparam int unsigned NDI  = IN_PER_XDN + FB_PER_XDN;
  localparam int unsigned SWD = 4, SWU = 4;
  localparam int unsigned CYCLES = 300;

  logic clk = 0, rst_n;
  logic [NCIN-1:0] cin;
  logic [N_OUT-1:0] cout;
  logic [N_XDN-1:0][N_CLB-1:0][SWD-1:0] cfg_dn_sel;
  logic [N_OUT-1:0][SWU-1:0] cfg_up_sel;
  logic [N_URM-1:0][SWU-1:0] cfg_urm_sel;
  logic [N_OUT-1:0] cfg_use_urm;
  clb_cfg_t [N_CLB-1:0] cfg_clb;
  logic [N_XDN-1:0][N_CLB-1:0] defect_dn, defect_val_dn;
  logic [N_OUT-1:0] defect_up, defect_val_up;

  always #5 clk = ~clk;

  cluster dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_comb_clb = 0, n_reg_clb = 0, n_fb_route = 0, n_up_defect_seen = 0;
  int n_urm_repair = 0, n_urm_fb_repair = 0, n_all_up_repaired = 0, n_dn_defect_seen = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- reference model ----------------
  logic [N_CLB-1:0] q_m;            // model flip-flops
  logic [N_CLB-1:0] q_ff;           // fault-free shadow flip-flops
  logic [N_CLB-1:0] clb_m;          // model CLB outputs
  logic [N_OUT-1:0] out_m, out_ff;  // model outputs: with defects, fault-free
  logic [N_CLB-1:0] lut_m;          // model LUT outputs (next state)

  function automatic logic up_mux(int k, logic [N_CLB-1:0] co, bit with_defects);
    int s;
    if (with_defects && cfg_use_urm[k]) s = int'(cfg_urm_sel[k % N_URM]);
    else begin
      if (with_defects && defect_up[k]) return defect_val_up[k];
      s = int'(cfg_up_sel[k]);
    end
    return (s < N_CLB) ? co[s] : 1'b0;
  endfunction

  // Evaluate the cluster for the current inputs and flip-flop state.
  task automatic evaluate(bit with_defects, input logic [N_CLB-1:0] q,
                         output logic [N_OUT-1:0] o, output logic [N_CLB-1:0] lo);
    logic [N_CLB-1:0] co; logic [N_OUT-1:0] fbv; logic [CLB_K-1:0] pins; int s;
    co = '0; fbv = '0; lo = '0;
    // settle: enough passes for registered -> feedback -> combinational -> output
    for (int pass = 0; pass < 4; pass++) begin
      for (int k = 0; k < N_OUT; k++) fbv[k] = up_mux(k, co, with_defects);
      for (int c = 0; c < N_CLB; c++) begin
        for (int d = 0; d < N_XDN; d++) begin
          s = int'(cfg_dn_sel[d][c]);
          if (with_defects && defect_dn[d][c]) pins[d] = defect_val_dn[d][c];
          else if (s < IN_PER_XDN) pins[d] = cin[d*IN_PER_XDN + s];
          else if (s < NDI) pins[d] = fbv[d*FB_PER_XDN + s - IN_PER_XDN];
          else pins[d] = 1'b0;
        end
        lo[c] = cfg_clb[c].lut[pins];
        co[c] = cfg_clb[c].registered ? q[c] : lo[c];
      end
    end
    for (int k = 0; k < N_OUT; k++) o[k] = up_mux(k, co, with_defects);
  endtask

  // ---------------- application ----------------
  task automatic place_application();
    int src_clb, k;
    for (int c = 0; c < N_CLB; c++) begin
      cfg_clb[c].lut = 16'($urandom);
      cfg_clb[c].registered = (c % 3 == 0) || ($urandom % 3 == 0);
      if (cfg_clb[c].registered) n_reg_clb++; else n_comb_clb++;
    end
    for (int kk = 0; kk < N_OUT; kk++) cfg_up_sel[kk] = SWU'($urandom % N_CLB);
    // make sure the first feedback of every crossbar down carries a registered CLB
    for (int d = 0; d < N_XDN; d++) cfg_up_sel[d*FB_PER_XDN] = SWU'(3 * (d % 4));
    for (int d = 0; d < N_XDN; d++)
      for (int c = 0; c < N_CLB; c++) begin
        cfg_dn_sel[d][c] = SWD'($urandom % NDI);
        if (c == d) cfg_dn_sel[d][c] = SWD'(IN_PER_XDN);  // force some feedback use
        if (int'(cfg_dn_sel[d][c]) >= IN_PER_XDN) begin
          k = d*FB_PER_XDN + int'(cfg_dn_sel[d][c]) - IN_PER_XDN;
          src_clb = int'(cfg_up_sel[k]);
          if (!cfg_clb[src_clb].registered) cfg_dn_sel[d][c] = SWD'($urandom % IN_PER_XDN);
          else n_fb_route++;
        end
      end
    cfg_urm_sel = '0; cfg_use_urm = '0;
    defect_dn = '0; defect_up = '0;
  endtask

  // Run n cycles with random inputs and defect values, checking every cycle.
  task automatic run(int n, output int n_diff);
    logic [N_CLB-1:0] lo, lo_ff;
    n_diff = 0;
    q_ff = q_m;  // the fault-free shadow restarts from the real state
    repeat (n) begin
      @(negedge clk);
      cin = NCIN'({$urandom, $urandom});
      defect_val_up = N_OUT'($urandom);
      for (int d = 0; d < N_XDN; d++) defect_val_dn[d] = N_CLB'($urandom);
      #1;
      evaluate(1'b1, q_m, out_m, lo);
      evaluate(1'b0, q_ff, out_ff, lo_ff);
      checks++;
      if (cout !== out_m) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d cout=%h model=%h", cyc, cout, out_m);
      end
      if (out_m !== out_ff) n_diff++;
      @(posedge clk);
      q_m = lo;
      q_ff = lo_ff;
      cyc++;
      #1;  // configuration changes after this return land clear of the clock edge
    end
  endtask

  initial begin
    int diff, k;
    rst_n = 0; cin = '0; q_m = '0;
    defect_val_up = '0; defect_val_dn = '0;
    place_application();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. fault-free
    run(CYCLES, diff);
    checks++;
    if (diff != 0) begin failures++; $display("FAIL model disagrees with itself without defects"); end

    // 2. defects on crossbar-up multiplexers 0 and 5 (output 0 is also a feedback)
    defect_up[0] = 1'b1; defect_up[5] = 1'b1;
    run(CYCLES, diff);
    n_up_defect_seen += diff;

    // 3. bypass them with URMs
    foreach (defect_up[kk]) if (defect_up[kk]) begin
      cfg_urm_sel[kk % N_URM] = cfg_up_sel[kk];
      cfg_use_urm[kk] = 1'b1;
      n_urm_repair++;
      if (kk % FB_PER_XDN == 0) n_urm_fb_repair++;
    end
    run(CYCLES, diff);
    checks++;
    if (diff != 0) begin failures++; $display("FAIL repaired cluster differs from fault-free"); end

    // 4. every crossbar-up multiplexer defective, every one bypassed
    defect_up = '1;
    for (int kk = 0; kk < N_OUT; kk++) begin
      cfg_urm_sel[kk % N_URM] = cfg_up_sel[kk];
      cfg_use_urm[kk] = 1'b1;
    end
    run(CYCLES, diff);
    checks++;
    if (diff != 0) begin failures++; $display("FAIL fully repaired crossbar up differs"); end
    else n_all_up_repaired++;

    // 5. defects in the crossbars down (not covered by URMs)
    defect_up = '0; cfg_use_urm = '0;
    defect_dn[1] = '1;          // a whole crossbar down defective
    defect_dn[2][0] = 1'b1;
    run(CYCLES, diff);
    n_dn_defect_seen += diff;

    $display("mechanisms: comb_clb=%0d reg_clb=%0d fb_routes=%0d up_defect_cycles=%0d urm_repairs=%0d urm_fb_repairs=%0d all_up_repaired=%0d dn_defect_cycles=%0d",
             n_comb_clb, n_reg_clb, n_fb_route, n_up_defect_seen, n_urm_repair, n_urm_fb_repair,
             n_all_up_repaired, n_dn_defect_seen);
    begin
      int m[8];
      m = '{n_comb_clb, n_reg_clb, n_fb_route, n_up_defect_seen, n_urm_repair,
            n_urm_fb_repair, n_all_up_repaired, n_dn_defect_seen};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
