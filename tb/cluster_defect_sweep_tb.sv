// Random defect-injection sweep on the crossbar up of the default cluster.
//
// For each trial a random application is placed (random truth tables,
// combinational and registered CLBs, routing through inputs and
// feedbacks), then n distinct crossbar-up multiplexers are made stuck-open,
// with n running from 1 to 12. Each defect is bypassed by the URM paired
// with its output (URM select = the defective multiplexer's select, output
// 2:1 multiplexer set to the URM). The cluster must then match an
// independent fault-free model of the application on every cycle. Before
// the repair, a short run counts whether the defects were visible.
// The largest defect set bypassed is reported in 2:1-multiplexer units
// (9 per 10:1 multiplexer).
module cluster_defect_sweep_tb;
  import moc_pkg::*;
  localparam int unsigned NCIN = N_XDN * IN_PER_XDN;
  localparam int unsigned NDI  = IN_PER_XDN + FB_PER_XDN;
  localparam int unsigned SWD = 4, SWU = 4;
  localparam int unsigned TRIALS = 48, CYCLES = 40;

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

  int checks = 0, failures = 0;
  int max_bypassed = 0, trials_visible = 0, trials_repaired = 0;
  logic [N_CLB-1:0] q_m;

  initial begin
    repeat (TRIALS * (2 * CYCLES + 8) + 1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Fault-free model: outputs and next flip-flop values of the application.
  task automatic evaluate(output logic [N_OUT-1:0] o, output logic [N_CLB-1:0] lo);
    logic [N_CLB-1:0] co; logic [N_OUT-1:0] fbv; logic [CLB_K-1:0] pins; int s;
    co = '0; fbv = '0; lo = '0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int k = 0; k < N_OUT; k++) fbv[k] = co[cfg_up_sel[k]];
      for (int c = 0; c < N_CLB; c++) begin
        for (int d = 0; d < N_XDN; d++) begin
          s = int'(cfg_dn_sel[d][c]);
          pins[d] = (s < IN_PER_XDN) ? cin[d*IN_PER_XDN + s] : fbv[d*FB_PER_XDN + s - IN_PER_XDN];
        end
        lo[c] = cfg_clb[c].lut[pins];
        co[c] = cfg_clb[c].registered ? q_m[c] : lo[c];
      end
    end
    for (int k = 0; k < N_OUT; k++) o[k] = co[cfg_up_sel[k]];
  endtask

  task automatic place_application();
    int k;
    for (int c = 0; c < N_CLB; c++) begin
      cfg_clb[c].lut = 16'($urandom);
      cfg_clb[c].registered = (c % 2 == 0) || ($urandom % 2 == 0);
    end
    for (int kk = 0; kk < N_OUT; kk++) cfg_up_sel[kk] = SWU'($urandom % N_CLB);
    for (int d = 0; d < N_XDN; d++)
      for (int c = 0; c < N_CLB; c++) begin
        cfg_dn_sel[d][c] = SWD'($urandom % NDI);
        if (int'(cfg_dn_sel[d][c]) >= IN_PER_XDN) begin
          k = d*FB_PER_XDN + int'(cfg_dn_sel[d][c]) - IN_PER_XDN;
          if (!cfg_clb[cfg_up_sel[k]].registered) cfg_dn_sel[d][c] = SWD'($urandom % IN_PER_XDN);
        end
      end
    cfg_urm_sel = '0; cfg_use_urm = '0; defect_dn = '0; defect_up = '0;
  endtask

  // n cycles; returns how many cycles the cluster differed from the model.
  task automatic run(int n, bit must_match, output int n_diff);
    logic [N_OUT-1:0] o; logic [N_CLB-1:0] lo;
    n_diff = 0;
    repeat (n) begin
      @(negedge clk);
      cin = NCIN'({$urandom, $urandom});
      defect_val_up = N_OUT'($urandom);
      #1 evaluate(o, lo);
      if (cout !== o) n_diff++;
      if (must_match) begin
        checks++;
        if (cout !== o) begin
          failures++;
          if (failures < 10) $display("FAIL cout=%h model=%h defects=%b", cout, o, defect_up);
        end
      end
      @(posedge clk);
      q_m = lo;
      #1;
    end
  endtask

  initial begin
    int n, k, diff;
    rst_n = 0; cin = '0; defect_val_dn = '0; defect_val_up = '0; q_m = '0;
    for (int t = 0; t < TRIALS; t++) begin
      place_application();
      rst_n = 0; q_m = '0;
      @(posedge clk); #1 rst_n = 1;
      n = (t % N_OUT) + 1;
      while ($countones(defect_up) < n) defect_up[$urandom % N_OUT] = 1'b1;
      // unrepaired: the model no longer describes the cluster, only count
      run(CYCLES, 1'b0, diff);
      if (diff > 0) trials_visible++;
      // bypass every defect with its URM; restart from reset so states agree
      for (int kk = 0; kk < N_OUT; kk++)
        if (defect_up[kk]) begin
          cfg_urm_sel[kk % N_URM] = cfg_up_sel[kk];
          cfg_use_urm[kk] = 1'b1;
        end
      rst_n = 0; q_m = '0;
      @(posedge clk); #1 rst_n = 1;
      run(CYCLES, 1'b1, diff);
      if (diff == 0) begin
        trials_repaired++;
        if (n * 9 > max_bypassed) max_bypassed = n * 9;
      end
    end
    $display("trials=%0d repaired=%0d visible_before_repair=%0d largest bypassed set=%0d mux2 of %0d in the crossbar up",
             TRIALS, trials_repaired, trials_visible, max_bypassed, N_OUT * 9);
    checks += 2;
    if (max_bypassed != N_OUT * 9) begin failures++; $display("FAIL full crossbar up not bypassed"); end
    if (trials_visible == 0) begin failures++; $display("FAIL defects never visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
