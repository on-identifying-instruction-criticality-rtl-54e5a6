// tb_cpp_index: checks the CPHT index of all four predictor types against
// index values computed bit by bit from the PC (instruction number, PC/8)
// and the two histories, for directed and random inputs.
module tb_cpp_index;
  import cpp_pkg::*;

  logic [31:0] pc;
  logic [7:0]  gcph, bhist;
  logic [10:0] i_pc, i_gcph, i_gbh, i_both;
  int checks = 0, failures = 0;

  cpp_index #(.MODE(IDX_PC))   u_pc   (.pc, .gcph, .bhist, .idx(i_pc));
  cpp_index #(.MODE(IDX_GCPH)) u_gcph (.pc, .gcph, .bhist, .idx(i_gcph));
  cpp_index #(.MODE(IDX_GBH))  u_gbh  (.pc, .gcph, .bhist, .idx(i_gbh));
  cpp_index #(.MODE(IDX_BOTH)) u_both (.pc, .gcph, .bhist, .idx(i_both));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [10:0] got, logic [10:0] exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: pc %h gcph %h bhr %h idx %h exp %h", what, pc, gcph, bhist, got, exp);
    end
  endtask

  initial begin
    logic [10:0] e_pc, e_g, e_b;
    // directed: PC 0x400008 is instruction 0x80001 -> low 11 bits 0x001
    pc = 32'h0040_0008; gcph = 8'hA5; bhist = 8'h0F; #1;
    chk(i_pc, 11'h001, "pc only");
    chk(i_gcph, 11'h0A4, "gcph");
    chk(i_gbh, 11'h00E, "gbh");
    chk(i_both, 11'h0AB, "both");
    repeat (3000) begin
      pc = $urandom; gcph = 8'($urandom); bhist = 8'($urandom); #1;
      for (int i = 0; i < 11; i++) e_pc[i] = pc[i+3];
      for (int i = 0; i < 11; i++) e_g[i] = (i < 8) ? gcph[i] : 1'b0;
      for (int i = 0; i < 11; i++) e_b[i] = (i < 8) ? bhist[i] : 1'b0;
      chk(i_pc, e_pc, "pc only");
      chk(i_gcph, e_pc ^ e_g, "gcph");
      chk(i_gbh, e_pc ^ e_b, "gbh");
      chk(i_both, e_pc ^ e_g ^ e_b, "both");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
