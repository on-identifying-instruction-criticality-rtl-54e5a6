// tb_gcph_reg: offers up to six criticality verdicts per cycle to the
// global critical path history register and compares it every cycle with a
// reference kept as a list of all verdicts in order (oldest lane first).
module tb_gcph_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] in_valid, in_crit;
  logic [7:0] hist;
  int checks = 0, failures = 0;

  gcph_reg dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m [$];
    logic [7:0] e;
    in_valid = 0; in_crit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) e[i] = (i < m.size()) ? m[m.size()-1-i] : 1'b0;
      checks++;
      if (hist != e) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d hist %b exp %b", c, hist, e);
      end
      in_valid = 6'($urandom);
      in_crit  = 6'($urandom);
      for (int k = 0; k < 6; k++) if (in_valid[k]) m.push_back(in_crit[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
