// tb_bhr: shifts random branch outcomes into the branch history register
// and compares it every cycle with a reference history.
module tb_bhr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic br_valid, br_taken;
  logic [7:0] hist;
  int checks = 0, failures = 0;

  bhr dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m [$];
    br_valid = 0; br_taken = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      for (int i = 0; i < 8; i++) begin
        if (hist[i] != ((i < m.size()) ? m[m.size()-1-i] : 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d bit %0d", c, i);
          break;
        end
      end
      br_valid = $urandom_range(0, 1);
      br_taken = $urandom_range(0, 1);
      if (br_valid) m.push_back(br_taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
