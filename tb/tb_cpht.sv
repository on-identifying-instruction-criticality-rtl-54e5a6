// tb_cpht: trains the critical path history table at its default size
// (2048 six-bit counters, +8/-1, threshold 8, six ports) with random
// verdicts on indexes drawn mostly from a small set, so that several ports
// often train the same counter in one cycle and counters reach both
// saturation limits. Every cycle all six lookups are compared with a
// reference table updated one port at a time. Also checks the hand-worked
// sequence 0 -> 8 (critical) -> 7 (not critical) and the threshold.
module tb_cpht;
  localparam int P = 6, ENTRIES = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0][10:0] rd_idx, wr_idx;
  logic [P-1:0]       rd_crit, wr_valid, wr_crit;
  logic [P-1:0][5:0]  rd_ctr;
  int checks = 0, failures = 0;

  cpht dut (.*);

  int m [ENTRIES];
  int n_hi = 0, n_lo = 0, n_same = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [10:0] pick();
    return ($urandom_range(0, 3) != 0) ? 11'($urandom_range(0, 7)) : 11'($urandom);
  endfunction

  initial begin
    for (int i = 0; i < ENTRIES; i++) m[i] = 0;
    rd_idx = '0; wr_idx = '0; wr_valid = '0; wr_crit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // hand-worked: entry 100 critical once -> 8 (predicted critical), then not critical -> 7
    wr_valid = 6'b000001; wr_idx[0] = 11'd100; wr_crit = 6'b000001; rd_idx[0] = 11'd100;
    @(negedge clk);
    check(rd_ctr[0] == 6'd8 && rd_crit[0], "0 + 8 = 8 is critical");
    wr_crit = 6'b0;
    @(negedge clk);
    check(rd_ctr[0] == 6'd7 && !rd_crit[0], "8 - 1 = 7 is not critical");
    wr_valid = '0;
    m[100] = 7;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        check(rd_ctr[p] == 6'(m[rd_idx[p]]), $sformatf("cycle %0d port %0d idx %0d ctr %0d exp %0d", c, p, rd_idx[p], rd_ctr[p], m[rd_idx[p]]));
        check(rd_crit[p] == (m[rd_idx[p]] >= 8), $sformatf("cycle %0d port %0d crit", c, p));
      end
      // new stimulus; phases bias the verdicts to reach both limits
      for (int p = 0; p < P; p++) begin
        rd_idx[p]   = pick();
        wr_idx[p]   = pick();
        wr_valid[p] = $urandom_range(0, 1);
        case ((c / 250) % 3)
          0: wr_crit[p] = ($urandom_range(0, 3) != 0);
          1: wr_crit[p] = ($urandom_range(0, 7) == 0);
          default: wr_crit[p] = $urandom_range(0, 1);
        endcase
      end
      for (int p = 0; p < P; p++) begin
        if (!wr_valid[p]) continue;
        for (int j = 0; j < p; j++) if (wr_valid[j] && wr_idx[j] == wr_idx[p]) begin n_same++; break; end
        if (wr_crit[p]) begin
          if (m[wr_idx[p]] + 8 > 63) n_hi++;
          m[wr_idx[p]] = (m[wr_idx[p]] + 8 > 63) ? 63 : m[wr_idx[p]] + 8;
        end else begin
          if (m[wr_idx[p]] == 0) n_lo++;
          m[wr_idx[p]] = (m[wr_idx[p]] == 0) ? 0 : m[wr_idx[p]] - 1;
        end
      end
    end
    check(n_hi > 0 && n_lo > 0 && n_same > 0, "saturation and same-entry merging exercised");
    $display("saturate high %0d, low %0d, same-entry %0d", n_hi, n_lo, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
