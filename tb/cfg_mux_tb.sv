// Self-checking testbench for cfg_mux: random data, selects (including the
// out-of-range ones, which must give 0) and stuck-open defects, compared
// with a bit-select reference. Ends with a TB_RESULT line.
module cfg_mux_tb;
  localparam int unsigned N = 9, SW = 4;
  logic [N-1:0] in; logic [SW-1:0] sel; logic defect, defect_val, out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cfg_mux #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 2000; i++) begin
      in = N'($urandom); sel = SW'($urandom); defect = ($urandom % 4) == 0; defect_val = 1'($urandom);
      if (i < 16) begin sel = SW'(i); defect = 0; end
      @(posedge clk); #1;
      exp = defect ? defect_val : (int'(sel) < N ? ((in >> sel) & 1'b1) : 1'b0);
      checks++;
      if (out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL in=%b sel=%0d defect=%b out=%b exp=%b", in, sel, defect, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
