// tb_fp_mul: checks the multiplier stage on unpacked operands: the 48-bit mantissa product
// with its exponent must equal the exact product (a double holds it exactly); a zero operand
// gives zero; exponent overflow raises the exception. One clock latency.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0;
  logic [32:0] op1, op2;
  logic [56:0] out1;
  logic done, exception_out;
  int checks = 0, failures = 0;
  fp_mul dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    op1 = 0; op2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      real x, y, r;
      op1 = {1'($urandom), 8'($urandom_range(90, 160)), 1'b1, 23'($urandom)};
      op2 = {1'($urandom), 8'($urandom_range(90, 160)), 1'b1, 23'($urandom)};
      if (i % 50 == 0) op2 = 33'd0;
      x = uval(op1[32], int'(op1[31:24]), 64'(op1[23:0]), 24);
      y = uval(op2[32], int'(op2[31:24]), 64'(op2[23:0]), 24);
      ready = 1;
      @(negedge clk); ready = 0;
      r = uval(out1[56], int'(out1[55:48]), 64'(out1[47:0]), 48);
      check(done && !exception_out && r == x * y,
            $sformatf("%h * %h -> %h: %g vs %g", op1, op2, out1, r, x * y));
    end
    op1 = {1'b0, 8'd250, 24'h800000}; op2 = op1; ready = 1;
    @(negedge clk); ready = 0;
    check(exception_out, "exponent overflow raises the exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
