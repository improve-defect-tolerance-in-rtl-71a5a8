// Self-checking testbench for xbar_up at its default size (twelve 10:1
// multiplexers over 10 CLB outputs): random selects, data and defects,
// each output compared with an independent decode of its select.
module xbar_up_tb;
  localparam int unsigned NS = 10, NM = 12, SW = 4;
  logic [NS-1:0] src; logic [NM-1:0][SW-1:0] sel;
  logic [NM-1:0] defect, defect_val, out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  xbar_up dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 1000; i++) begin
      src = NS'($urandom);
      for (int k = 0; k < NM; k++) begin
        sel[k] = SW'(i < 16 ? (i + k) % 16 : $urandom % 10);
        defect[k] = (i >= 16) && (($urandom % 5) == 0);
        defect_val[k] = 1'($urandom);
      end
      @(posedge clk); #1;
      for (int k = 0; k < NM; k++) begin
        if (defect[k]) exp = defect_val[k];
        else if (int'(sel[k]) < NS) exp = src[sel[k]];
        else exp = 1'b0;
        checks++;
        if (out[k] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL mux %0d sel=%0d", k, sel[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
