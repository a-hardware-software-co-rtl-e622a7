// tb_fp_shift_adjust: checks mantissa alignment with guard bit: the large mantissa gets a '0'
// guard bit, the small one is shifted right by the exponent difference (up to beyond the
// mantissa width), and the large exponent is passed on. One clock latency.
module tb_fp_shift_adjust;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0;
  logic [32:0] op_large, op_small;
  logic sign_l, sign_s, done, exception_out;
  logic [7:0] exp_out;
  logic [24:0] large_m, small_m;
  int checks = 0, failures = 0;
  fp_shift_adjust dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    op_large = 0; op_small = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int d;
      logic [49:0] wide;
      d = $urandom_range(0, 30);
      op_large = {1'($urandom), 8'($urandom_range(40, 200)), 1'b1, 23'($urandom)};
      op_small = {1'($urandom), op_large[31:24] - 8'(d), 1'b1, 23'($urandom)};
      ready = 1;
      @(negedge clk); ready = 0;
      wide = {op_small[23:0], 26'd0};               // exact shifted value, 25 kept bits
      wide = wide >> d;
      check(done, "done");
      check(exp_out == op_large[31:24] && sign_l == op_large[32] && sign_s == op_small[32], "fields");
      check(large_m == {op_large[23:0], 1'b0}, "large mantissa with guard bit");
      check(small_m == wide[49:25], $sformatf("shift by %0d: %h", d, small_m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
