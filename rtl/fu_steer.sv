// fu_steer: issue steering for the dual-speed integer units. Instructions
// predicted critical go to fast units, the others to slow units, so that
// the critical path runs at full speed while the rest of the work runs on
// the power-efficient units.
//
// How it works, in one cycle, lanes taken in order (lane 0 first):
//   pass 1: a critical lane takes the lowest free fast unit, a non-critical
//           lane the lowest free slow unit;
//   pass 2: a lane that found its preferred kind exhausted takes any unit
//           still free, fast first (a fallback);
// a lane that still has no unit is not issued (lane_go low) and must be
// offered again. Fast units are always free; a slow unit is free when its
// slow_free bit is set.
//
// Interface: lane_valid/lane_crit in; lane_go (issued), lane_fast (issued
// to a fast unit), lane_fallback (issued to the other kind of unit) out;
// per unit a select (fast_go/fast_lane, slow_go/slow_lane). Combinational.
// The critical-to-fast, non-critical-to-slow rule follows the design; the
// fallback, the lane order and the stall are this implementation's choices.
module fu_steer #(
  parameter int unsigned LANES  = 6,
  parameter int unsigned N_FAST = 3,
  parameter int unsigned N_SLOW = 3,
  localparam int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [LANES-1:0]               lane_valid,
  input  logic [LANES-1:0]               lane_crit,
  input  logic [N_SLOW-1:0]              slow_free,
  output logic [LANES-1:0]               lane_go,
  output logic [LANES-1:0]               lane_fast,
  output logic [LANES-1:0]               lane_fallback,
  output logic [N_FAST-1:0]              fast_go,
  output logic [N_FAST-1:0][LANE_W-1:0]  fast_lane,
  output logic [N_SLOW-1:0]              slow_go,
  output logic [N_SLOW-1:0][LANE_W-1:0]  slow_lane
);

  always_comb begin
    logic [N_FAST-1:0] f_used;
    logic [N_SLOW-1:0] s_used;
    logic              done;

    f_used        = '0;
    s_used        = ~slow_free;
    lane_go       = '0;
    lane_fast     = '0;
    lane_fallback = '0;
    fast_go       = '0;
    fast_lane     = '0;
    slow_go       = '0;
    slow_lane     = '0;

    // pass 1: preferred kind of unit
    for (int l = 0; l < LANES; l++) begin
      done = 1'b0;
      if (lane_valid[l] && lane_crit[l]) begin
        for (int u = 0; u < N_FAST; u++) begin
          if (!done && !f_used[u]) begin
            f_used[u]    = 1'b1;
            fast_go[u]   = 1'b1;
            fast_lane[u] = LANE_W'(l);
            lane_go[l]   = 1'b1;
            lane_fast[l] = 1'b1;
            done         = 1'b1;
          end
        end
      end else if (lane_valid[l]) begin
        for (int u = 0; u < N_SLOW; u++) begin
          if (!done && !s_used[u]) begin
            s_used[u]    = 1'b1;
            slow_go[u]   = 1'b1;
            slow_lane[u] = LANE_W'(l);
            lane_go[l]   = 1'b1;
            done         = 1'b1;
          end
        end
      end
    end

    // pass 2: fallback to whatever unit is left
    for (int l = 0; l < LANES; l++) begin
      done = 1'b0;
      if (lane_valid[l] && !lane_go[l]) begin
        for (int u = 0; u < N_FAST; u++) begin
          if (!done && !f_used[u]) begin
            f_used[u]        = 1'b1;
            fast_go[u]       = 1'b1;
            fast_lane[u]     = LANE_W'(l);
            lane_go[l]       = 1'b1;
            lane_fast[l]     = 1'b1;
            lane_fallback[l] = 1'b1;
            done             = 1'b1;
          end
        end
        for (int u = 0; u < N_SLOW; u++) begin
          if (!done && !s_used[u]) begin
            s_used[u]        = 1'b1;
            slow_go[u]       = 1'b1;
            slow_lane[u]     = LANE_W'(l);
            lane_go[l]       = 1'b1;
            lane_fallback[l] = 1'b1;
            done             = 1'b1;
          end
        end
      end
    end
  end

  // Rules of the assignment: only offered lanes issue, a fallback is an
  // issued lane, and a busy slow unit is never started.
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      a_go_valid: assert (!lane_go[l] || lane_valid[l]);
      a_fb_go:    assert (!lane_fallback[l] || lane_go[l]);
    end
    for (int u = 0; u < N_SLOW; u++) begin
      a_slow_free: assert (!slow_go[u] || slow_free[u]);
    end
  end

endmodule
