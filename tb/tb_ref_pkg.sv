// tb_ref_pkg: reference functions shared by the testbenches. ref_alu
// computes an integer operation bit by bit (shifts as repeated one-bit
// shifts, subtraction as addition of the complement), independently of the
// ALU under test.
package tb_ref_pkg;
  import cpp_pkg::*;

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    case (op)
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a + ~b + 32'd1;
      ALU_AND:  r = a & b;
      ALU_OR:   r = a | b;
      ALU_XOR:  r = (a | b) & ~(a & b);
      ALU_NOR:  r = ~a & ~b;
      ALU_SLT:  r = (a[31] != b[31]) ? {31'b0, a[31]} : {31'b0, a < b};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_SLL:  begin r = a; repeat (int'(b[4:0])) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = a; repeat (int'(b[4:0])) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = a; repeat (int'(b[4:0])) r = {r[31], r[31:1]}; end
      ALU_LUI:  r = {b[15:0], 16'b0};
      default:  r = '0;
    endcase
    return r;
  endfunction

  function automatic int_op_t rand_op(logic [7:0] tag);
    int_op_t o;
    o.op  = alu_op_e'($urandom_range(0, 11));
    o.a   = $urandom;
    o.b   = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 40)) : $urandom;
    o.tag = tag;
    return o;
  endfunction
endpackage
