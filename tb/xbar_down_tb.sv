// Self-checking testbench for xbar_down at its default size (6 inputs,
// 3 feedbacks, ten 9:1 multiplexers): every multiplexer gets random
// selects, data and defects; each output is compared with an independent
// model that decodes the select into a cluster input, a feedback, or 0.
module xbar_down_tb;
  localparam int unsigned NI = 6, NF = 3, NM = 10, SW = 4;
  logic [NI-1:0] cin; logic [NF-1:0] fb;
  logic [NM-1:0][SW-1:0] sel; logic [NM-1:0] defect, defect_val, out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  xbar_down dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic ref_out(int s, logic d, logic dv);
    if (d) return dv;
    if (s < NI) return cin[s];
    if (s < NI + NF) return fb[s - NI];
    return 1'b0;
  endfunction

  initial begin
    for (int i = 0; i < 1000; i++) begin
      cin = NI'($urandom); fb = NF'($urandom);
      for (int j = 0; j < NM; j++) begin
        sel[j] = SW'(i < 16 ? (i + j) % 16 : $urandom % 10);
        defect[j] = (i >= 16) && (($urandom % 5) == 0);
        defect_val[j] = 1'($urandom);
      end
      @(posedge clk); #1;
      for (int j = 0; j < NM; j++) begin
        checks++;
        if (out[j] !== ref_out(int'(sel[j]), defect[j], defect_val[j])) begin
          failures++;
          if (failures < 10) $display("FAIL mux %0d sel=%0d", j, sel[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
