// crit_int_cluster: the integer execution cluster of an energy-aware
// out-of-order core. The cluster has N_FAST fast integer units on a high
// supply voltage and N_SLOW slow, power-efficient units on a low one. Each
// integer instruction the core issues is looked up in a critical path
// predictor; instructions predicted to lie on the critical path run on a
// fast unit and the rest on a slow unit, so the program's execution time is
// kept while most of the work is done at low energy.
//
// How it works: in each cycle up to LANES instructions are offered
// (lane_valid, lane_pc, lane_op). critical_path_predictor gives each one a
// prediction and a CPHT index; fu_steer assigns the lanes to units; an
// issued lane (lane_ready) is routed to its unit. The core also supplies,
// for every offered instruction, the verdict of its criticality heuristic
// (lane_heur_crit, e.g. whether it was the oldest in the instruction queue);
// the predictor is trained with it when the instruction issues, that is
// speculatively at the issue stage, at the index it was predicted from.
// Branch outcomes (br_valid, br_taken) feed the predictor's branch history.
//
// lane_fallback marks a lane issued to the kind of unit it was not predicted
// for (all units of its kind were taken); gcph and bhist show the
// predictor's two history registers.
//
// Timing: lane_ready, lane_pred_crit, lane_on_fast and lane_fallback are
// combinational in the offer cycle. A fast unit delivers its result one cycle after issue,
// a slow unit two cycles after issue and is busy in between. A lane that is
// not ready must be offered again. The defaults are the evaluated
// configuration (GCPH-type predictor with a 2K-entry table of 6-bit
// counters, +8/-1, threshold 8, 8-bit history; 3 fast and 3 slow units, six
// integer units in all). The lane interface, the steering fallback and
// the slow unit being unpipelined are this implementation's choices.
module crit_int_cluster
  import cpp_pkg::*;
#(
  parameter idx_mode_e   MODE     = IDX_GCPH,
  parameter int unsigned LANES    = 6,
  parameter int unsigned N_FAST   = 3,
  parameter int unsigned N_SLOW   = 3,
  parameter int unsigned ENTRIES  = 2048,
  parameter int unsigned CTR_W    = 6,
  parameter int unsigned INC      = 8,
  parameter int unsigned DEC      = 1,
  parameter int unsigned THRESH   = 8,
  parameter int unsigned GCPH_LEN = 8,
  parameter int unsigned BHR_LEN  = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,     // synchronous, active low
  // issue lanes
  input  logic     [LANES-1:0]         lane_valid,
  input  logic     [LANES-1:0][PC_W-1:0] lane_pc,
  input  int_op_t  [LANES-1:0]         lane_op,
  input  logic     [LANES-1:0]         lane_heur_crit,
  output logic     [LANES-1:0]         lane_ready,
  output logic     [LANES-1:0]         lane_pred_crit,
  output logic     [LANES-1:0]         lane_on_fast,
  output logic     [LANES-1:0]         lane_fallback,
  // branch outcomes
  input  logic                         br_valid,
  input  logic                         br_taken,
  // results
  output logic     [N_FAST-1:0]        fast_res_valid,
  output int_res_t [N_FAST-1:0]        fast_res,
  output logic     [N_SLOW-1:0]        slow_res_valid,
  output int_res_t [N_SLOW-1:0]        slow_res,
  // predictor histories, for observation
  output logic     [GCPH_LEN-1:0]      gcph,
  output logic     [BHR_LEN-1:0]       bhist
);

  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  localparam int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1;

  logic [LANES-1:0][IDX_W-1:0] lk_idx;

  critical_path_predictor #(
    .MODE(MODE), .ENTRIES(ENTRIES), .CTR_W(CTR_W), .INC(INC), .DEC(DEC),
    .THRESH(THRESH), .GCPH_LEN(GCPH_LEN), .BHR_LEN(BHR_LEN), .PORTS(LANES)
  ) u_cpp (
    .clk, .rst_n,
    .lk_pc(lane_pc), .lk_crit(lane_pred_crit), .lk_idx(lk_idx),
    .up_valid(lane_ready), .up_idx(lk_idx), .up_crit(lane_heur_crit),
    .br_valid, .br_taken,
    .gcph, .bhist
  );

  logic [N_SLOW-1:0]             slow_free;
  logic [N_FAST-1:0]             fast_go;
  logic [N_FAST-1:0][LANE_W-1:0] fast_lane;
  logic [N_SLOW-1:0]             slow_go;
  logic [N_SLOW-1:0][LANE_W-1:0] slow_lane;

  fu_steer #(.LANES(LANES), .N_FAST(N_FAST), .N_SLOW(N_SLOW)) u_steer (
    .lane_valid, .lane_crit(lane_pred_crit), .slow_free,
    .lane_go(lane_ready), .lane_fast(lane_on_fast), .lane_fallback,
    .fast_go, .fast_lane, .slow_go, .slow_lane
  );

  for (genvar u = 0; u < N_FAST; u++) begin : g_fast
    fast_int_unit u_fast (
      .clk, .rst_n,
      .in_valid(fast_go[u]), .in_op(lane_op[fast_lane[u]]),
      .res_valid(fast_res_valid[u]), .res(fast_res[u])
    );
  end

  for (genvar u = 0; u < N_SLOW; u++) begin : g_slow
    slow_int_unit u_slow (
      .clk, .rst_n,
      .in_valid(slow_go[u]), .in_ready(slow_free[u]), .in_op(lane_op[slow_lane[u]]),
      .res_valid(slow_res_valid[u]), .res(slow_res[u])
    );
  end

endmodule
