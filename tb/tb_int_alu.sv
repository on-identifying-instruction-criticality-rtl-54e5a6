// tb_int_alu: checks every operation of the integer ALU against a
// bit-by-bit reference, with directed corner values (sign boundaries, shift
// amounts 0 and 31) and random operands.
module tb_int_alu;
  import cpp_pkg::*;
  import tb_ref_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  int_alu dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ref_alu(o, x, z)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h -> %h exp %h", o.name(), x, z, y, ref_alu(o, x, z));
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1f};
    for (int o = 0; o < 12; o++)
      foreach (corner[i]) foreach (corner[j]) try(alu_op_e'(o), corner[i], corner[j]);
    // spot values computed by hand
    try(ALU_SLT, 32'hffff_fffe, 32'h1);   // -2 < 1
    op = ALU_SLT; a = 32'hffff_fffe; b = 32'h1; #1; checks++; if (y != 32'd1) failures++;
    op = ALU_SRA; a = 32'h8000_0000; b = 32'd4; #1; checks++; if (y != 32'hf800_0000) failures++;
    op = ALU_LUI; a = 32'h0; b = 32'h0000_1234; #1; checks++; if (y != 32'h1234_0000) failures++;
    op = ALU_SUB; a = 32'd5; b = 32'd7; #1; checks++; if (y != 32'hffff_fffe) failures++;
    repeat (4000) try(alu_op_e'($urandom_range(0, 11)), $urandom, ($urandom_range(0, 1) == 0) ? 32'($urandom_range(0, 31)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
