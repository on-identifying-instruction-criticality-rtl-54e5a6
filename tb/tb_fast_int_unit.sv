// tb_fast_int_unit: issues random operations on random cycles and checks
// that each result, with its tag, appears exactly one cycle after issue and
// that res_valid is low otherwise.
module tb_fast_int_unit;
  import cpp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, res_valid;
  int_op_t in_op;
  int_res_t res;
  int checks = 0, failures = 0;

  fast_int_unit dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          prev_v;
    logic [31:0] prev_d;
    logic [7:0]  prev_t;
    in_valid = 0; in_op = '0; prev_v = 0;
    repeat (2) @(negedge clk);
    checks++; if (res_valid) failures++;   // cleared by reset
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (res_valid != prev_v || (prev_v && (res.data != prev_d || res.tag != prev_t))) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: valid %0b data %h tag %h, exp %0b %h %h", c, res_valid, res.data, res.tag, prev_v, prev_d, prev_t);
      end
      in_valid = $urandom_range(0, 1);
      in_op    = rand_op(8'(c));
      prev_v   = in_valid;
      prev_d   = ref_alu(in_op.op, in_op.a, in_op.b);
      prev_t   = in_op.tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
