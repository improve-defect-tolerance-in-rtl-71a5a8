// Self-checking testbench for clb: random truth tables and inputs. In
// combinational mode the output must equal the truth-table bit at once; in
// registered mode it must equal the bit sampled at the previous rising
// edge, and 0 right after reset.
module clb_tb;
  import moc_pkg::*;
  logic clk = 0, rst_n;
  logic [CLB_K-1:0] in; clb_cfg_t cfg; logic out;
  int checks = 0, failures = 0;
  logic prev;
  always #5 clk = ~clk;

  clb dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s in=%h out=%b exp=%b", what, in, out, exp);
    end
  endtask

  initial begin
    rst_n = 0; in = '0; cfg = '{lut: 16'hffff, registered: 1'b1};
    @(negedge clk); check(1'b0, "reset");
    rst_n = 1;
    prev = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      cfg.lut = 16'($urandom); cfg.registered = 1'b0;
      in = CLB_K'($urandom);
      #1 check(cfg.lut[in], "comb");
      cfg.registered = 1'b1;
      prev = cfg.lut[in];
      @(posedge clk); #1;
      check(prev, "reg");
      in = CLB_K'($urandom); cfg.lut = 16'($urandom); #1;
      check(prev, "reg hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
