// critical_path_predictor: a correlation-based critical path predictor.
// It predicts whether an instruction lies on the program's critical path
// from the saturating counter the CPHT keeps for it, and it learns from the
// criticality verdicts that a training heuristic delivers.
//
// How it works: for each of PORTS lookup ports, cpp_index combines the PC
// with the GCPH register and/or the branch history register (MODE selects
// the predictor type), and the CPHT counter at that index gives the
// prediction (counter >= THRESH). The index is also returned (lk_idx), so
// that the verdict for the instruction trains the same counter it was
// predicted from. Training (up_valid, up_idx, up_crit) raises the counter by
// INC or lowers it by DEC and shifts the verdicts, in port order, into the
// GCPH register. Branch outcomes (br_valid, br_taken) shift into the BHR.
//
// Timing: lookups are combinational on the histories and table as they
// stand at the start of the cycle; training and history updates take effect
// at the clock edge. Predictor types, table size, counter width, steps,
// threshold and history length follow the design; the defaults are the
// evaluated GCPH-type configuration. Port counts and index return are this
// implementation's choices.
module critical_path_predictor
  import cpp_pkg::*;
#(
  parameter idx_mode_e   MODE     = IDX_GCPH,
  parameter int unsigned ENTRIES  = 2048,
  parameter int unsigned CTR_W    = 6,
  parameter int unsigned INC      = 8,
  parameter int unsigned DEC      = 1,
  parameter int unsigned THRESH   = 8,
  parameter int unsigned GCPH_LEN = 8,
  parameter int unsigned BHR_LEN  = 8,
  parameter int unsigned PORTS    = 6,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic                          clk,
  input  logic                          rst_n,     // synchronous, active low
  // lookup
  input  logic [PORTS-1:0][PC_W-1:0]    lk_pc,
  output logic [PORTS-1:0]              lk_crit,
  output logic [PORTS-1:0][IDX_W-1:0]   lk_idx,
  // training
  input  logic [PORTS-1:0]              up_valid,
  input  logic [PORTS-1:0][IDX_W-1:0]   up_idx,
  input  logic [PORTS-1:0]              up_crit,
  // branch outcomes
  input  logic                          br_valid,
  input  logic                          br_taken,
  // histories, for observation
  output logic [GCPH_LEN-1:0]           gcph,
  output logic [BHR_LEN-1:0]            bhist
);

  gcph_reg #(.LEN(GCPH_LEN), .PORTS(PORTS)) u_gcph (
    .clk, .rst_n, .in_valid(up_valid), .in_crit(up_crit), .hist(gcph)
  );

  bhr #(.LEN(BHR_LEN)) u_bhr (
    .clk, .rst_n, .br_valid, .br_taken, .hist(bhist)
  );

  for (genvar p = 0; p < PORTS; p++) begin : g_idx
    cpp_index #(.MODE(MODE), .IDX_W(IDX_W), .GCPH_LEN(GCPH_LEN), .BHR_LEN(BHR_LEN)) u_index (
      .pc(lk_pc[p]), .gcph(gcph), .bhist(bhist), .idx(lk_idx[p])
    );
  end

  logic [PORTS-1:0][CTR_W-1:0] rd_ctr_unused;

  cpht #(
    .ENTRIES(ENTRIES), .CTR_W(CTR_W), .INC(INC), .DEC(DEC), .THRESH(THRESH),
    .RD_PORTS(PORTS), .WR_PORTS(PORTS)
  ) u_cpht (
    .clk, .rst_n,
    .rd_idx(lk_idx), .rd_crit(lk_crit), .rd_ctr(rd_ctr_unused),
    .wr_valid(up_valid), .wr_idx(up_idx), .wr_crit(up_crit)
  );

endmodule
