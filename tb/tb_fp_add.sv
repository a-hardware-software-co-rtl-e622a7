// tb_fp_add: checks the four-stage adder on unpacked operands (explicit integer bit).
// The result {sign, exponent, 25-bit mantissa} is converted to a real and compared with the
// exact sum; truncation of the shifted-out bits and of the carry shift may lose less than two
// guard-bit units.
// Latency must be four clocks.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0;
  logic [32:0] op1, op2;
  logic [33:0] out1;
  logic done, exception_out;
  int checks = 0, failures = 0;
  fp_add dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    op1 = 0; op2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      real x, y, r, ulp;
      int lat;
      op1 = {1'($urandom), 8'($urandom_range(110, 140)), 1'b1, 23'($urandom)};
      op2 = {1'($urandom), 8'($urandom_range(110, 140)), 1'b1, 23'($urandom)};
      if (i % 100 == 0) op2 = {~op1[32], op1[31:0]};
      x = uval(op1[32], int'(op1[31:24]), 64'(op1[23:0]), 24);
      y = uval(op2[32], int'(op2[31:24]), 64'(op2[23:0]), 24);
      exception_in = (i % 97 == 0);
      ready = 1;
      @(negedge clk); ready = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      if (i == 1) check(lat == 4, $sformatf("latency %0d, expected 4", lat));
      r   = uval(out1[33], int'(out1[32:25]), 64'(out1[24:0]), 25);
      ulp = pow2(int'(op1[31:24] > op2[31:24] ? op1[31:24] : op2[31:24]) - 127 - 24);
      if (exception_in) check(exception_out && out1 == 0, "exception passes through");
      else check(!exception_out && absr(r - (x + y)) < 2.0 * ulp,
                 $sformatf("%h + %h -> %h: %g vs %g", op1, op2, out1, r, x + y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
