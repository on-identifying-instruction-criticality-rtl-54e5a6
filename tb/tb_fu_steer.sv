// tb_fu_steer: checks the steering rules on random lane sets and slow-unit
// availability: each issued lane gets exactly one unit and each unit at
// most one lane; a busy slow unit gets none; critical lanes fill the fast
// units in lane order before anything falls back, non-critical lanes the
// free slow units; a lane falls back only when every unit of its preferred
// kind is taken, and is left unissued only when every unit is taken. Also
// one hand-worked case.
module tb_fu_steer;
  localparam int L = 6, NF = 3, NS = 3;
  logic [L-1:0] lane_valid, lane_crit, lane_go, lane_fast, lane_fallback;
  logic [NS-1:0] slow_free;
  logic [NF-1:0] fast_go;
  logic [NF-1:0][2:0] fast_lane;
  logic [NS-1:0] slow_go;
  logic [NS-1:0][2:0] slow_lane;
  int checks = 0, failures = 0;

  fu_steer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s (valid %b crit %b free %b)", what, lane_valid, lane_crit, slow_free); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fb = 0, n_stall = 0;
    // hand-worked: lanes 0-3 critical, 4-5 not; slow unit 1 busy.
    // lanes 0,1,2 -> fast 0,1,2; lane 4 -> slow 0; lane 5 -> slow 2; lane 3 stalls.
    lane_valid = 6'b111111; lane_crit = 6'b001111; slow_free = 3'b101; #1;
    check(lane_go == 6'b110111, "hand case lane_go");
    check(lane_fast == 6'b000111 && lane_fallback == 6'b0, "hand case fast/fallback");
    check(fast_lane[0] == 0 && fast_lane[1] == 1 && fast_lane[2] == 2 && fast_go == 3'b111, "hand case fast units");
    check(slow_go == 3'b101 && slow_lane[0] == 4 && slow_lane[2] == 5, "hand case slow units");
    repeat (20000) begin
      int owner [L];
      int n_crit, n_free_slow, n_fast_used, n_slow_used, n_valid, n_go;
      lane_valid = 6'($urandom); lane_crit = 6'($urandom); slow_free = 3'($urandom); #1;
      foreach (owner[l]) owner[l] = 0;
      n_fast_used = 0; n_slow_used = 0;
      for (int u = 0; u < NF; u++) if (fast_go[u]) begin
        n_fast_used++;
        check(fast_lane[u] < L && lane_go[fast_lane[u]] && lane_fast[fast_lane[u]], "fast unit given to an issued fast lane");
        owner[fast_lane[u]]++;
        if (u > 0) check(fast_go[u-1], "fast units filled lowest first");
      end
      for (int u = 0; u < NS; u++) if (slow_go[u]) begin
        n_slow_used++;
        check(slow_free[u], "busy slow unit used");
        check(slow_lane[u] < L && lane_go[slow_lane[u]] && !lane_fast[slow_lane[u]], "slow unit given to an issued slow lane");
        owner[slow_lane[u]]++;
      end
      n_crit = 0; n_valid = 0; n_go = 0;
      for (int l = 0; l < L; l++) begin
        check(owner[l] == (lane_go[l] ? 1 : 0), "each issued lane has exactly one unit");
        if (lane_go[l]) check(lane_valid[l], "invalid lane issued");
        if (lane_valid[l]) n_valid++;
        if (lane_go[l]) n_go++;
        if (lane_valid[l] && lane_crit[l]) n_crit++;
        if (lane_go[l]) check(lane_fallback[l] == (lane_fast[l] != lane_crit[l]), "fallback flag");
      end
      n_free_slow = $countones(slow_free);
      // issued count = min(valid, fast + free slow)
      check(n_go == ((n_valid < NF + n_free_slow) ? n_valid : NF + n_free_slow), "issue count");
      // a critical lane on a slow unit only if the fast units are all taken by critical lanes
      for (int l = 0; l < L; l++) begin
        if (lane_go[l] && lane_crit[l] && !lane_fast[l]) begin
          check(n_crit > NF, "critical lane fell back while a fast unit was free for it");
          n_fb++;
        end
        if (lane_go[l] && !lane_crit[l] && lane_fast[l]) begin
          check(n_valid - n_crit > n_free_slow, "non-critical lane fell back while a slow unit was free for it");
          n_fb++;
        end
        if (lane_valid[l] && !lane_go[l]) n_stall++;
      end
      // the first NF critical lanes always get fast units
      begin
        int seen = 0;
        for (int l = 0; l < L; l++) if (lane_valid[l] && lane_crit[l]) begin
          if (seen < NF) check(lane_go[l] && lane_fast[l] && !lane_fallback[l], "early critical lane on fast unit");
          seen++;
        end
      end
    end
    check(n_fb > 0 && n_stall > 0, "fallback and stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
