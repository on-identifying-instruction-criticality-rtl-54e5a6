// cpht: the critical path history table. A direct-mapped table of ENTRIES
// saturating up-down counters of CTR_W bits. A counter is raised by INC when
// its instruction is found critical and lowered by DEC otherwise, saturating
// at 0 and at 2**CTR_W-1. An instruction is predicted critical when its
// counter is at or above THRESH.
//
// Interface: RD_PORTS combinational lookup ports (rd_idx -> rd_crit, rd_ctr)
// and WR_PORTS training ports (wr_valid, wr_idx, wr_crit). A lookup sees the
// table as it was at the start of the cycle; training is written at the
// clock edge. Training ports are applied in port order: when several ports
// train the same entry in one cycle, the steps accumulate as if they had
// been applied one after another, and only the last such port writes.
// Reset clears every counter.
//
// Table size, counter width, steps and threshold default to the evaluated
// configuration (2K entries, 6 bits, +8, -1, threshold 8). The port counts,
// the merging of same-entry updates and the reset value are this
// implementation's choices.
module cpht #(
  parameter int unsigned ENTRIES  = 2048,
  parameter int unsigned CTR_W    = 6,
  parameter int unsigned INC      = 8,
  parameter int unsigned DEC      = 1,
  parameter int unsigned THRESH   = 8,
  parameter int unsigned RD_PORTS = 6,
  parameter int unsigned WR_PORTS = 6,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic                               clk,
  input  logic                               rst_n,    // synchronous, active low
  input  logic [RD_PORTS-1:0][IDX_W-1:0]     rd_idx,
  output logic [RD_PORTS-1:0]                rd_crit,
  output logic [RD_PORTS-1:0][CTR_W-1:0]     rd_ctr,
  input  logic [WR_PORTS-1:0]                wr_valid,
  input  logic [WR_PORTS-1:0][IDX_W-1:0]     wr_idx,
  input  logic [WR_PORTS-1:0]                wr_crit
);

  localparam logic [CTR_W:0] CTR_MAX = {1'b0, {CTR_W{1'b1}}};

  logic [CTR_W-1:0] table_q [ENTRIES];

  // One training step of a saturating up-down counter.
  function automatic logic [CTR_W-1:0] step(input logic [CTR_W-1:0] v, input logic crit);
    logic [CTR_W:0] up;
    if (crit) begin
      up = {1'b0, v} + (CTR_W+1)'(INC);
      return (up > CTR_MAX) ? CTR_MAX[CTR_W-1:0] : up[CTR_W-1:0];
    end else begin
      return (v >= CTR_W'(DEC)) ? v - CTR_W'(DEC) : '0;
    end
  endfunction

  // Lookup.
  always_comb begin
    for (int p = 0; p < RD_PORTS; p++) begin
      rd_ctr[p]  = table_q[rd_idx[p]];
      rd_crit[p] = (table_q[rd_idx[p]] >= CTR_W'(THRESH));
    end
  end

  // Merge the training ports: port k's new value applies every valid port
  // j <= k that trains the same entry, in port order; port k writes only if
  // no later valid port trains that entry.
  logic [WR_PORTS-1:0][CTR_W-1:0] wr_val;
  logic [WR_PORTS-1:0]            wr_en;

  always_comb begin
    for (int k = 0; k < WR_PORTS; k++) begin
      wr_val[k] = table_q[wr_idx[k]];
      for (int j = 0; j <= k; j++) begin
        if (wr_valid[j] && wr_idx[j] == wr_idx[k]) wr_val[k] = step(wr_val[k], wr_crit[j]);
      end
      wr_en[k] = wr_valid[k];
      for (int j = k + 1; j < WR_PORTS; j++) begin
        if (wr_valid[j] && wr_idx[j] == wr_idx[k]) wr_en[k] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else begin
      for (int k = 0; k < WR_PORTS; k++) begin
        if (wr_en[k]) table_q[wr_idx[k]] <= wr_val[k];
      end
    end
  end

endmodule
