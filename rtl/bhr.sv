// bhr: the branch history register. A LEN-bit shift register of global
// branch outcomes (1 = taken): a new outcome enters at bit 0 and the oldest
// (bit LEN-1) is dropped.
//
// Interface: one outcome per cycle (br_valid, br_taken); hist changes at the
// clock edge. Reset clears it.
//
// The register itself is part of the design; its length (8, equal to the
// history length of the core's gshare branch predictor), its bit order, the
// one-outcome-per-cycle port and the reset value are this implementation's
// choices.
module bhr #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           rst_n,     // synchronous, active low
  input  logic           br_valid,
  input  logic           br_taken,
  output logic [LEN-1:0] hist
);

  always_ff @(posedge clk) begin
    if (!rst_n)        hist <= '0;
    else if (br_valid) hist <= {hist[LEN-2:0], br_taken};
  end

endmodule
