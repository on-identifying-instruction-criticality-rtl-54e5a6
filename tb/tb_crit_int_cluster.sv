// tb_crit_int_cluster: end-to-end test of the criticality-steered integer
// cluster at its default parameters (GCPH-type predictor, 2048 x 6-bit
// table, +8/-1, threshold 8, 8-bit history, 6 lanes, 3 fast + 3 slow units).
//
// Each cycle the bench offers random integer instructions on the six lanes,
// drawn from a small set of PCs so that the predictor learns, together with
// a heuristic verdict that depends on the PC and on the test phase. A
// reference model kept in the bench (its own counter table, criticality
// history, branch history, steering rule and ALU) predicts every
// prediction, every lane assignment, and the value, tag, unit and cycle of
// every result. Phases force the mechanisms of the design: all-critical
// bursts (counters saturate high, critical lanes overflow to slow units),
// all-non-critical bursts (counters saturate low, slow units are busy and
// lanes stall or fall back to fast units) and random traffic. The bench
// counts each mechanism and fails if one never occurs.
module tb_crit_int_cluster;
  import cpp_pkg::*;

  localparam int LANES = 6, NF = 3, NS = 3, ENTRIES = 2048, IDX_W = 11;
  localparam int CYCLES = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [LANES-1:0]           lane_valid, lane_heur_crit;
  logic     [LANES-1:0][PC_W-1:0] lane_pc;
  int_op_t  [LANES-1:0]           lane_op;
  logic     [LANES-1:0]           lane_ready, lane_pred_crit, lane_on_fast, lane_fallback;
  logic                           br_valid, br_taken;
  logic     [NF-1:0]              fast_res_valid;
  int_res_t [NF-1:0]              fast_res;
  logic     [NS-1:0]              slow_res_valid;
  int_res_t [NS-1:0]              slow_res;
  logic     [7:0]                 gcph, bhist;

  crit_int_cluster dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---------------- reference model ----------------
  int unsigned m_tbl [ENTRIES];
  logic [7:0]  m_gcph, m_bhr;
  int          m_slow_busy [NS];   // cycle until which the slow unit is busy

  typedef struct { bit live; logic [31:0] data; int due; bit fast; int unit; } exp_t;
  exp_t exp_q [256];

  // mechanism counters
  int n_crit_fast, n_noncrit_slow, n_fb_crit_slow, n_fb_noncrit_fast, n_stall;
  int n_sat_hi, n_sat_lo, n_same_idx, n_pred_crit, n_gcph_shift, n_bhr_shift, n_results;

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    case (op)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a + ~b + 1;
      ALU_AND:  r = a & b;
      ALU_OR:   r = a | b;
      ALU_XOR:  r = (a | b) & ~(a & b);
      ALU_NOR:  r = ~a & ~b;
      ALU_SLT:  r = (a[31] != b[31]) ? {31'b0, a[31]} : {31'b0, a < b};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_SLL:  begin r = a; repeat (b[4:0]) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = a; repeat (b[4:0]) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = a; repeat (b[4:0]) r = {r[31], r[31:1]}; end
      ALU_LUI:  r = b << 16;
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------- stimulus ----------------
  int phase;   // 0 random, 1 all critical, 2 all non-critical

  task automatic drive();
    for (int l = 0; l < LANES; l++) begin
      logic [3:0] pcsel;
      pcsel          = 4'($urandom_range(0, 15));
      lane_valid[l]  = ($urandom_range(0, 9) < 8);
      lane_pc[l]     = 32'h0040_0000 + (32'(pcsel) << 3);
      lane_op[l].op  = alu_op_e'($urandom_range(0, 11));
      lane_op[l].a   = $urandom;
      lane_op[l].b   = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      lane_op[l].tag = 8'(((cycle % 32) << 3) | l);
      case (phase)
        1:       lane_heur_crit[l] = 1'b1;
        2:       lane_heur_crit[l] = 1'b0;
        default: lane_heur_crit[l] = (pcsel < 6) ? ($urandom_range(0, 9) < 9) : ($urandom_range(0, 9) < 1);
      endcase
    end
    br_valid = $urandom_range(0, 1);
    br_taken = $urandom_range(0, 1);
  endtask

  task automatic check_results();
    for (int u = 0; u < NF + NS; u++) begin
      bit v; int_res_t r;
      v = (u < NF) ? fast_res_valid[u] : slow_res_valid[u-NF];
      r = (u < NF) ? fast_res[u] : slow_res[u-NF];
      if (v) begin
        exp_t e;
        e = exp_q[r.tag];
        n_results++;
        check(e.live, $sformatf("unexpected result tag %0h", r.tag));
        if (e.live) begin
          check(e.data == r.data, $sformatf("tag %0h data %h exp %h", r.tag, r.data, e.data));
          check(e.due == cycle, $sformatf("tag %0h at cycle %0d, due %0d", r.tag, cycle, e.due));
          check((u < NF) == e.fast && (u % NF) == e.unit % NF,
                $sformatf("tag %0h from unit %0d", r.tag, u));
          exp_q[r.tag].live = 0;
        end
      end
    end
    for (int t = 0; t < 256; t++)
      if (exp_q[t].live && exp_q[t].due < cycle) begin
        check(0, $sformatf("result tag %0h missing", t));
        exp_q[t].live = 0;
      end
  endtask

  // Compute the reference outcome of the offer cycle and update the model.
  task automatic step_model();
    int unsigned idx [LANES];
    bit pred [LANES], go [LANES], on_fast [LANES], fb [LANES];
    int unit [LANES];
    int fast_used, slow_taken [NS];
    // predictions
    for (int l = 0; l < LANES; l++) begin
      idx[l]  = ((lane_pc[l] >> 3) & (ENTRIES - 1)) ^ m_gcph;
      pred[l] = (m_tbl[idx[l]] >= 8);
      if (lane_valid[l]) begin
        check(lane_pred_crit[l] == pred[l], $sformatf("lane %0d prediction", l));
        if (pred[l]) n_pred_crit++;
      end
    end
    // steering: preferred kind first, then any free unit, fast before slow
    fast_used = 0;
    for (int s = 0; s < NS; s++) slow_taken[s] = (m_slow_busy[s] >= cycle);
    for (int l = 0; l < LANES; l++) begin
      go[l] = 0; on_fast[l] = 0; fb[l] = 0; unit[l] = -1;
      if (!lane_valid[l]) continue;
      if (pred[l] && fast_used < NF) begin
        go[l] = 1; on_fast[l] = 1; unit[l] = fast_used++;
      end else if (!pred[l]) begin
        for (int s = 0; s < NS; s++)
          if (!go[l] && !slow_taken[s]) begin slow_taken[s] = 1; go[l] = 1; unit[l] = s; end
      end
    end
    for (int l = 0; l < LANES; l++) begin
      if (!lane_valid[l] || go[l]) continue;
      if (fast_used < NF) begin
        go[l] = 1; on_fast[l] = 1; fb[l] = 1; unit[l] = fast_used++;
      end else begin
        for (int s = 0; s < NS; s++)
          if (!go[l] && !slow_taken[s]) begin slow_taken[s] = 1; go[l] = 1; fb[l] = 1; unit[l] = s; end
      end
    end
    for (int l = 0; l < LANES; l++) begin
      check(lane_ready[l] == go[l], $sformatf("lane %0d ready %0b exp %0b", l, lane_ready[l], go[l]));
      if (go[l]) begin
        check(lane_on_fast[l] == on_fast[l], $sformatf("lane %0d on_fast", l));
        check(lane_fallback[l] == fb[l], $sformatf("lane %0d fallback", l));
        exp_q[lane_op[l].tag] = '{1, ref_alu(lane_op[l].op, lane_op[l].a, lane_op[l].b),
                                  cycle + (on_fast[l] ? 1 : 2), on_fast[l], unit[l]};
        if (!on_fast[l]) m_slow_busy[unit[l]] = cycle + 1;
        if (pred[l] && on_fast[l]) n_crit_fast++;
        if (!pred[l] && !on_fast[l]) n_noncrit_slow++;
        if (pred[l] && !on_fast[l]) n_fb_crit_slow++;
        if (!pred[l] && on_fast[l]) n_fb_noncrit_fast++;
      end else if (lane_valid[l]) n_stall++;
    end
    // training, in lane order, at the predicted index
    for (int l = 0; l < LANES; l++) begin
      if (!go[l]) continue;
      for (int j = 0; j < l; j++) if (go[j] && idx[j] == idx[l]) begin n_same_idx++; break; end
      if (lane_heur_crit[l]) begin
        if (m_tbl[idx[l]] + 8 > 63) begin m_tbl[idx[l]] = 63; n_sat_hi++; end
        else m_tbl[idx[l]] += 8;
      end else begin
        if (m_tbl[idx[l]] == 0) n_sat_lo++;
        else m_tbl[idx[l]] -= 1;
      end
      m_gcph = {m_gcph[6:0], lane_heur_crit[l]};
      n_gcph_shift++;
    end
    if (br_valid) begin m_bhr = {m_bhr[6:0], br_taken}; n_bhr_shift++; end
  endtask

  // watchdog
  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ENTRIES; i++) m_tbl[i] = 0;
    for (int t = 0; t < 256; t++) exp_q[t].live = 0;
    for (int s = 0; s < NS; s++) m_slow_busy[s] = -1;
    m_gcph = 0; m_bhr = 0;
    lane_valid = '0; lane_heur_crit = '0; lane_pc = '0; lane_op = '0;
    br_valid = 0; br_taken = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cycle = 0; cycle < CYCLES; cycle++) begin
      phase = ((cycle / 100) % 4 == 1) ? 1 : ((cycle / 100) % 4 == 3) ? 2 : 0;
      check_results();
      drive();
      #1;
      check(gcph == m_gcph, "criticality history register");
      check(bhist == m_bhr, "branch history register");
      step_model();
      @(negedge clk);
    end
    $display("mechanisms: crit->fast %0d, noncrit->slow %0d, crit->slow fallback %0d, noncrit->fast fallback %0d, stall %0d",
             n_crit_fast, n_noncrit_slow, n_fb_crit_slow, n_fb_noncrit_fast, n_stall);
    $display("            counter saturates high %0d, low %0d, same-entry updates %0d, predicted critical %0d, gcph shifts %0d, bhr shifts %0d, results %0d",
             n_sat_hi, n_sat_lo, n_same_idx, n_pred_crit, n_gcph_shift, n_bhr_shift, n_results);
    check(n_crit_fast > 0, "critical to fast never happened");
    check(n_noncrit_slow > 0, "non-critical to slow never happened");
    check(n_fb_crit_slow > 0, "critical fallback to slow never happened");
    check(n_fb_noncrit_fast > 0, "non-critical fallback to fast never happened");
    check(n_stall > 0, "stall never happened");
    check(n_sat_hi > 0, "counter saturation high never happened");
    check(n_sat_lo > 0, "counter saturation low never happened");
    check(n_same_idx > 0, "same-entry update never happened");
    check(n_bhr_shift > 0, "branch history never shifted");
    check(n_results > 1000, "too few results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
