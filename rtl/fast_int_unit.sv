// fast_int_unit: an integer functional unit on the high supply voltage.
// It executes an operation in one cycle and can accept a new one every cycle.
//
// Timing: an operation presented with in_valid in cycle c is evaluated by
// int_alu during cycle c and its result (with the operation's tag) appears
// on res/res_valid in cycle c+1. The unit is always ready. One-cycle
// execution follows the design; the result register at the output is this
// implementation's choice of where the cycle ends.
module fast_int_unit
  import cpp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,      // synchronous, active low
  input  logic     in_valid,
  input  int_op_t  in_op,
  output logic     res_valid,
  output int_res_t res
);

  logic [XLEN-1:0] y;

  int_alu u_alu (.op(in_op.op), .a(in_op.a), .b(in_op.b), .y(y));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= in_valid;
      if (in_valid) begin
        res.tag  <= in_op.tag;
        res.data <= y;
      end
    end
  end

endmodule
