// tb_fp_swap: checks the magnitude ordering of the operand swap stage and its one-clock
// ready->done latency. Equal magnitudes must route B to 'op_large'.
module tb_fp_swap;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0;
  logic [32:0] a, b, op_large, op_small;
  logic done, exception_out;
  int checks = 0, failures = 0;
  fp_swap dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [32:0] x, y;
      logic        xl;
      x = {$urandom, 1'b1}; y = {$urandom, 1'b1};
      if (i % 4 == 0) y[31:24] = x[31:24];            // equal exponents
      if (i % 50 == 0) y[31:0] = x[31:0];              // equal magnitudes
      x[23] = 1'b1; y[23] = 1'b1;
      xl = (x[31:24] > y[31:24]) || (x[31:24] == y[31:24] && x[23:0] > y[23:0]);
      a = x; b = y; ready = 1; exception_in = i[0];
      @(negedge clk); ready = 0;
      check(done && exception_out == i[0], "done/exception one clock after ready");
      check(op_large == (xl ? x : y) && op_small == (xl ? y : x), $sformatf("order %h %h", x, y));
      @(negedge clk);
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
