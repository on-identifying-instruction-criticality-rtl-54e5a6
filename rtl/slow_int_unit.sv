// slow_int_unit: an integer functional unit on the low supply voltage. It is
// the same ALU circuit as the fast unit, but at the lower voltage it needs
// two cycles to settle, so an operation takes two cycles.
//
// How it works: when an operation is accepted, its opcode and operands are
// captured in a holding register and kept stable for the second cycle; the
// ALU output is sampled at the end of that cycle (a two-cycle path from the
// issue stage through the holding register). The unit is not pipelined: it
// is busy (in_ready low) in the cycle after it accepts an operation.
//
// Timing: accepted in cycle c (in_valid && in_ready), result on res/res_valid
// in cycle c+2, in_ready low in cycle c+1, a new operation can be accepted
// in cycle c+2. Two-cycle execution follows the design; that the unit is not
// pipelined is this implementation's reading of a slower circuit.
module slow_int_unit
  import cpp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,      // synchronous, active low
  input  logic     in_valid,
  output logic     in_ready,
  input  int_op_t  in_op,
  output logic     res_valid,
  output int_res_t res
);

  int_op_t         held;
  logic            busy;
  logic [XLEN-1:0] y;

  assign in_ready = !busy;

  int_alu u_alu (.op(held.op), .a(held.a), .b(held.b), .y(y));

  // The unit is unpipelined: busy lasts exactly one cycle, and a result
  // follows every busy cycle.
  a_busy_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) busy |=> !busy);
  a_result_after_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |=> res_valid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      held      <= '0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= busy;
      if (busy) begin
        res.tag  <= held.tag;
        res.data <= y;
        busy     <= 1'b0;
      end else if (in_valid) begin
        held <= in_op;
        busy <= 1'b1;
      end
    end
  end

endmodule
