// Self-checking testbench for urm. Two instances: the default one URM per
// cluster output, and a single shared URM. Each output must pass its
// crossbar-up multiplexer unless its 2:1 multiplexer selects the URM, in
// which case it must carry the CLB output the URM select names.
module urm_tb;
  localparam int unsigned NS = 10, NO = 12, SW = 4;
  logic [NS-1:0] src; logic [NO-1:0] xbar_out, use_urm, out_a, out_b;
  logic [NO-1:0][SW-1:0] sel_a; logic [0:0][SW-1:0] sel_b;
  int checks = 0, failures = 0, urm_used = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  urm dut_a (.src(src), .xbar_out(xbar_out), .urm_sel(sel_a), .use_urm(use_urm), .out(out_a));
  urm #(.N_URM(1)) dut_b (.src(src), .xbar_out(xbar_out), .urm_sel(sel_b), .use_urm(use_urm), .out(out_b));

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic pick(logic [SW-1:0] s);
    return (int'(s) < NS) ? src[s] : 1'b0;
  endfunction

  initial begin
    logic ea, eb;
    for (int i = 0; i < 1000; i++) begin
      src = NS'($urandom); xbar_out = NO'($urandom); use_urm = NO'($urandom);
      for (int u = 0; u < NO; u++) sel_a[u] = SW'($urandom % 10);
      sel_b[0] = SW'($urandom % 10);
      @(posedge clk); #1;
      for (int k = 0; k < NO; k++) begin
        ea = use_urm[k] ? pick(sel_a[k]) : xbar_out[k];
        eb = use_urm[k] ? pick(sel_b[0]) : xbar_out[k];
        if (use_urm[k]) urm_used++;
        checks += 2;
        if (out_a[k] !== ea) begin failures++; if (failures < 10) $display("FAIL a out %0d", k); end
        if (out_b[k] !== eb) begin failures++; if (failures < 10) $display("FAIL b out %0d", k); end
      end
    end
    checks++;
    if (urm_used == 0) begin failures++; $display("FAIL URM path never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
