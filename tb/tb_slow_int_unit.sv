// tb_slow_int_unit: offers random operations every cycle and checks the
// slow unit's handshake and timing: an accepted operation's result appears
// exactly two cycles later, the unit refuses operations in the cycle after
// it accepts one, and it accepts again in the cycle its result appears.
module tb_slow_int_unit;
  import cpp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, res_valid;
  int_op_t in_op;
  int_res_t res;
  int checks = 0, failures = 0;

  slow_int_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          acc_cycle;
    logic [31:0] exp_d;
    logic [7:0]  exp_t;
    int          n_acc;
    in_valid = 0; in_op = '0; acc_cycle = -10; n_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // result due two cycles after acceptance
      check(res_valid == (c == acc_cycle + 2), $sformatf("cycle %0d res_valid %0b", c, res_valid));
      if (c == acc_cycle + 2) check(res.data == exp_d && res.tag == exp_t, $sformatf("cycle %0d result %h", c, res.data));
      check(in_ready == (c != acc_cycle + 1), $sformatf("cycle %0d in_ready %0b", c, in_ready));
      in_valid = ($urandom_range(0, 3) != 0);
      in_op    = rand_op(8'(c));
      #1;
      if (in_valid && in_ready) begin
        acc_cycle = c; n_acc++;
        exp_d = ref_alu(in_op.op, in_op.a, in_op.b);
        exp_t = in_op.tag;
      end
    end
    check(n_acc > 500, "too few operations accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
