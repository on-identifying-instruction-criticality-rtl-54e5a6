// tb_fig1_dfg_loop: runs a small data flow graph as a loop on the cluster
// at its default parameters. The graph has eight instructions I0..I7 with
// edges I0->I2, I0->I3, I1->I5, I2->I7, I3->I4, I3->I5, I4->I6, I6->I7; with
// one-cycle operations its critical path is I0->I3->I4->I6->I7.
//
// The bench acts as a dataflow issue stage: every cycle it offers, oldest
// first, each instruction whose producers have delivered their results, and
// it trains the predictor with the exact criticality of the graph (an
// oracle verdict). Iterations run one after another. Checks:
//   - every result equals the value computed by the bench;
//   - iteration 0 (empty table, everything predicted non-critical and run
//     on slow units) takes 10 cycles from the issue of I0 to the result of
//     I7, worked out by hand: five dependent two-cycle steps;
//   - after training, the predictor marks exactly I0, I3, I4, I6, I7 as
//     critical, they run on fast units, I1, I2 and I5 run on slow units, and
//     the same latency is 5 cycles, that of the critical path on fast units:
//     the slow units hold no instruction the loop waits for.
module tb_fig1_dfg_loop;
  import cpp_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8, ITERS = 40;
  localparam bit [N-1:0] CRIT = 8'b1101_1001;   // I7, I6, I4, I3, I0

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [5:0]       lane_valid, lane_heur_crit, lane_ready, lane_pred_crit, lane_on_fast, lane_fallback;
  logic     [5:0][31:0] lane_pc;
  int_op_t  [5:0]       lane_op;
  logic                 br_valid = 1'b0, br_taken = 1'b0;
  logic     [2:0]       fast_res_valid, slow_res_valid;
  int_res_t [2:0]       fast_res, slow_res;
  logic     [7:0]       gcph, bhist;

  crit_int_cluster dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // operation and sources of each instruction; source -1 = iteration input
  alu_op_e     ops  [N] = '{ALU_ADD, ALU_XOR, ALU_SLL, ALU_SUB, ALU_AND, ALU_OR, ALU_ADD, ALU_XOR};
  int          srca [N] = '{-1, -1, 0, 0, 3, 3, 4, 6};
  int          srcb [N] = '{-2, -2, -3, -1, -4, 1, -5, 2};

  function automatic logic [31:0] input_val(int code, int it);
    case (code)
      -1: return 32'h1000_0000 + 32'(it * 3);
      -2: return 32'h0000_5555 ^ 32'(it);
      -3: return 32'd2;
      -4: return 32'h0000_ffff;
      default: return 32'd7;
    endcase
  endfunction

  initial begin
    repeat (ITERS * 20 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] val [N], expv [N];
    bit          issued [N], done [N], on_fast [N], pred [N];
    int          t0, lat, cycle;
    lane_valid = '0; lane_heur_crit = '0; lane_pc = '0; lane_op = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cycle = 0;
    for (int it = 0; it < ITERS; it++) begin
      // values the bench expects
      for (int k = 0; k < N; k++) begin
        logic [31:0] a, b;
        a = (srca[k] < 0) ? input_val(srca[k], it) : expv[srca[k]];
        b = (srcb[k] < 0) ? input_val(srcb[k], it) : expv[srcb[k]];
        expv[k] = ref_alu(ops[k], a, b);
        issued[k] = 0; done[k] = 0;
      end
      t0 = -1; lat = -1;
      while (!done[N-1] || !(done[1] && done[2] && done[5])) begin
        int l;
        // collect results
        for (int u = 0; u < 6; u++) begin
          bit v; int_res_t r;
          v = (u < 3) ? fast_res_valid[u] : slow_res_valid[u-3];
          r = (u < 3) ? fast_res[u] : slow_res[u-3];
          if (v) begin
            int k;
            k = int'(r.tag) % N;
            check(issued[k] && !done[k], $sformatf("iteration %0d: unexpected result for I%0d", it, k));
            check(r.data == expv[k], $sformatf("iteration %0d I%0d = %h, expected %h", it, k, r.data, expv[k]));
            val[k] = r.data; done[k] = 1;
            if (k == N - 1) lat = cycle - t0;
          end
        end
        // offer every ready instruction, oldest first
        lane_valid = '0;
        l = 0;
        for (int k = 0; k < N && l < 6; k++) begin
          bit ra, rb;
          ra = (srca[k] < 0) || done[srca[k]];
          rb = (srcb[k] < 0) || done[srcb[k]];
          if (!issued[k] && ra && rb) begin
            lane_valid[l]     = 1'b1;
            lane_pc[l]        = 32'h0040_0100 + 32'(k * 8);
            lane_op[l].op     = ops[k];
            lane_op[l].a      = (srca[k] < 0) ? input_val(srca[k], it) : val[srca[k]];
            lane_op[l].b      = (srcb[k] < 0) ? input_val(srcb[k], it) : val[srcb[k]];
            lane_op[l].tag    = 8'(((it % 32) * N) + k);
            lane_heur_crit[l] = CRIT[k];
            l++;
          end
        end
        #1;
        for (int j = 0; j < 6; j++) if (lane_valid[j] && lane_ready[j]) begin
          int k;
          k = int'(lane_op[j].tag) % N;
          issued[k] = 1; on_fast[k] = lane_on_fast[j]; pred[k] = lane_pred_crit[j];
          if (k == 0) t0 = cycle;
        end
        @(negedge clk);
        cycle++;
      end
      if (it == 0) check(lat == 10, $sformatf("iteration 0 latency %0d, expected 10", lat));
      if (it >= ITERS - 10) begin
        check(lat == 5, $sformatf("iteration %0d latency %0d, expected 5", it, lat));
        for (int k = 0; k < N; k++) begin
          check(pred[k] == CRIT[k], $sformatf("iteration %0d I%0d predicted %0b", it, k, pred[k]));
          check(on_fast[k] == CRIT[k], $sformatf("iteration %0d I%0d on fast %0b", it, k, on_fast[k]));
        end
      end
      if (it == 0 || it == ITERS - 1) begin
        int nf;
        nf = 0;
        for (int k = 0; k < N; k++) nf += on_fast[k];
        $display("iteration %0d: I0 issue to I7 result %0d cycles, %0d of %0d on fast units", it, lat, nf, N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
