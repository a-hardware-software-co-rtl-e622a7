// tb_fp_correction: checks the four output cases of the adder's last stage: input exception
// (zero result, flag passed on), zero sum, mantissa overflow (shift right with MSB '1' and
// exponent + 1, exception at the top exponent) and the plain pass-through.
module tb_fp_correction;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0, sign_in = 0;
  logic [7:0] exp_in;
  logic [25:0] sum;
  logic [33:0] out1;
  logic done, exception_out;
  int checks = 0, failures = 0;
  fp_correction dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic apply(input bit x, input bit s, input logic [7:0] e, input logic [25:0] m);
    exception_in = x; sign_in = s; exp_in = e; sum = m; ready = 1;
    @(negedge clk); ready = 0;
  endtask
  initial begin
    exp_in = 0; sum = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [7:0]  e;
      logic [25:0] m;
      bit s;
      e = 8'($urandom_range(1, 253)); m = 26'($urandom); s = 1'($urandom);
      apply(1'b1, s, e, m);
      check(done && exception_out && out1 == 0, "input exception");
      apply(1'b0, s, e, 26'd0);
      check(!exception_out && out1 == 0, "zero sum");
      m[25] = 1'b1;
      apply(1'b0, s, e, m);
      check(!exception_out && out1 == {s, e + 8'd1, 1'b1, m[24:1]}, "carry: shift right, exp+1");
      m[25] = 1'b0; m[24] = 1'b1;
      apply(1'b0, s, e, m);
      check(!exception_out && out1 == {s, e, m[24:0]}, "pass-through");
    end
    apply(1'b0, 1'b0, 8'd254, 26'h2000000);
    check(exception_out, "exponent overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
