// int_alu: the integer ALU circuit. The fast and the slow functional units
// are both built around this one circuit; they differ only in supply voltage
// and transistor sizing, which RTL does not model, and therefore in how many
// cycles they allow it to settle (one cycle in fast_int_unit, two in
// slow_int_unit).
//
// Purely combinational: y = op(a, b). The operation set (add, subtract,
// logic, set-less-than, shifts by b[4:0], load-upper-immediate) is a MIPS-like
// integer set chosen by this implementation; the design only says that the
// units execute most integer operations.
module int_alu
  import cpp_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      ALU_SLL:  y = a << shamt;
      ALU_SRL:  y = a >> shamt;
      ALU_SRA:  y = $unsigned($signed(a) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = '0;
    endcase
  end

endmodule
