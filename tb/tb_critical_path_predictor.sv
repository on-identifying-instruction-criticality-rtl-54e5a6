// tb_critical_path_predictor: runs the four predictor types side by side on
// the same stream: per-address (PC only), GCPH (PC and criticality history,
// the default), GBH (PC and branch history) and BOTH, each at the default
// table size with six ports. A reference model per predictor (counter table,
// histories, index function) predicts lk_idx and lk_crit on every port every
// cycle. The bench trains
// each instruction at the index it was predicted from, as the issue stage
// does, with a verdict that depends on the PC, so that the predictor learns.
module tb_critical_path_predictor;
  import cpp_pkg::*;
  localparam int P = 6, ENTRIES = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0][31:0] lk_pc;
  logic [P-1:0]       up_valid, up_crit;
  logic               br_valid, br_taken;
  logic [P-1:0]       crit_g, crit_b, crit_p, crit_h;
  logic [P-1:0][10:0] idx_g, idx_b, idx_p, idx_h;
  logic [7:0]         gcph_g, gcph_b, bh_g, bh_b, gcph_p, bh_p, gcph_h, bh_h;
  int checks = 0, failures = 0;

  critical_path_predictor #(.MODE(IDX_GCPH)) u_g (
    .clk, .rst_n, .lk_pc, .lk_crit(crit_g), .lk_idx(idx_g),
    .up_valid, .up_idx(idx_g), .up_crit, .br_valid, .br_taken, .gcph(gcph_g), .bhist(bh_g));
  critical_path_predictor #(.MODE(IDX_BOTH)) u_b (
    .clk, .rst_n, .lk_pc, .lk_crit(crit_b), .lk_idx(idx_b),
    .up_valid, .up_idx(idx_b), .up_crit, .br_valid, .br_taken, .gcph(gcph_b), .bhist(bh_b));

  critical_path_predictor #(.MODE(IDX_PC)) u_p (
    .clk, .rst_n, .lk_pc, .lk_crit(crit_p), .lk_idx(idx_p),
    .up_valid, .up_idx(idx_p), .up_crit, .br_valid, .br_taken, .gcph(gcph_p), .bhist(bh_p));
  critical_path_predictor #(.MODE(IDX_GBH)) u_h (
    .clk, .rst_n, .lk_pc, .lk_crit(crit_h), .lk_idx(idx_h),
    .up_valid, .up_idx(idx_h), .up_crit, .br_valid, .br_taken, .gcph(gcph_h), .bhist(bh_h));

  int mg [ENTRIES], mb [ENTRIES], mp [ENTRIES], mh [ENTRIES];
  logic [7:0] m_gcph, m_bhr;
  int n_learned = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int train(int v, bit c);
    return c ? ((v + 8 > 63) ? 63 : v + 8) : ((v == 0) ? 0 : v - 1);
  endfunction

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eg [P], eb [P], ep [P], eh [P];
    for (int i = 0; i < ENTRIES; i++) begin mg[i] = 0; mb[i] = 0; mp[i] = 0; mh[i] = 0; end
    m_gcph = 0; m_bhr = 0;
    lk_pc = '0; up_valid = '0; up_crit = '0; br_valid = 0; br_taken = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        int sel;
        sel         = $urandom_range(0, 11);
        lk_pc[p]    = 32'h0040_0000 + 32'(sel * 8);
        up_valid[p] = ($urandom_range(0, 3) != 0);
        up_crit[p]  = (sel < 4) ? ($urandom_range(0, 15) != 0) : ($urandom_range(0, 15) == 0);
      end
      br_valid = $urandom_range(0, 1);
      br_taken = $urandom_range(0, 1);
      #1;
      check(gcph_g == m_gcph && gcph_b == m_gcph, "criticality history");
      check(gcph_p == m_gcph && gcph_h == m_gcph, "criticality history");
      check(bh_b == m_bhr && bh_g == m_bhr && bh_p == m_bhr && bh_h == m_bhr, "branch history");
      for (int p = 0; p < P; p++) begin
        int pcn;
        pcn   = int'(lk_pc[p] >> 3) % ENTRIES;
        eg[p] = pcn ^ int'(m_gcph);
        eb[p] = pcn ^ int'(m_gcph) ^ int'(m_bhr);
        ep[p] = pcn;
        eh[p] = pcn ^ int'(m_bhr);
        check(int'(idx_p[p]) == ep[p], $sformatf("cycle %0d port %0d pc index", c, p));
        check(int'(idx_h[p]) == eh[p], $sformatf("cycle %0d port %0d gbh index", c, p));
        check(crit_p[p] == (mp[ep[p]] >= 8), $sformatf("cycle %0d port %0d pc prediction", c, p));
        check(crit_h[p] == (mh[eh[p]] >= 8), $sformatf("cycle %0d port %0d gbh prediction", c, p));
        check(int'(idx_g[p]) == eg[p], $sformatf("cycle %0d port %0d gcph index %h exp %h", c, p, idx_g[p], eg[p]));
        check(int'(idx_b[p]) == eb[p], $sformatf("cycle %0d port %0d both index %h exp %h", c, p, idx_b[p], eb[p]));
        check(crit_g[p] == (mg[eg[p]] >= 8), $sformatf("cycle %0d port %0d gcph prediction", c, p));
        check(crit_b[p] == (mb[eb[p]] >= 8), $sformatf("cycle %0d port %0d both prediction", c, p));
        if (crit_g[p] && up_crit[p]) n_learned++;
      end
      for (int p = 0; p < P; p++) if (up_valid[p]) begin
        mg[eg[p]] = train(mg[eg[p]], up_crit[p]);
        mb[eb[p]] = train(mb[eb[p]], up_crit[p]);
        mp[ep[p]] = train(mp[ep[p]], up_crit[p]);
        mh[eh[p]] = train(mh[eh[p]], up_crit[p]);
        m_gcph = {m_gcph[6:0], up_crit[p]};
      end
      if (br_valid) m_bhr = {m_bhr[6:0], br_taken};
    end
    check(n_learned > 100, "predictor never learned critical instructions");
    $display("correct critical predictions %0d", n_learned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
