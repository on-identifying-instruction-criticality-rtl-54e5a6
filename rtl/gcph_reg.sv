// gcph_reg: the global critical path history (GCPH) register. A LEN-bit
// shift register holding the criticality of the most recent instructions:
// each time an instruction's criticality is decided, its bit enters at the
// top (bit 0) and the oldest bit (bit LEN-1) is dropped.
//
// Interface: up to PORTS verdicts per cycle (in_valid, in_crit); valid
// ports are shifted in in port order, port 0 being the oldest instruction,
// so the last valid port ends up in bit 0. hist is the register value and
// changes at the clock edge. Reset clears it.
//
// The 8-instruction length is the evaluated configuration; the bit order,
// the several-per-cycle shifting and the reset value are this
// implementation's choices.
module gcph_reg #(
  parameter int unsigned LEN   = 8,
  parameter int unsigned PORTS = 6
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic [PORTS-1:0] in_valid,
  input  logic [PORTS-1:0] in_crit,
  output logic [LEN-1:0]   hist
);

  logic [LEN-1:0] hist_d;

  always_comb begin
    hist_d = hist;
    for (int k = 0; k < PORTS; k++) begin
      if (in_valid[k]) hist_d = {hist_d[LEN-2:0], in_crit[k]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) hist <= '0;
    else        hist <= hist_d;
  end

endmodule
