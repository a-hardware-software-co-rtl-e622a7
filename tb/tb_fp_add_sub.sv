// tb_fp_add_sub: checks that aligned mantissas are added when the signs agree and
// subtracted when they differ, with the large operand's sign and exponent kept.
module tb_fp_add_sub;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0;
  logic sign_l, sign_s, sign_out, done, exception_out;
  logic [7:0] exp_in, exp_out;
  logic [24:0] large_m, small_m;
  logic [25:0] sum;
  int checks = 0, failures = 0;
  fp_add_sub dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    {sign_l, sign_s, exp_in, large_m, small_m} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int unsigned lg, sm;
      lg = (1 << 24) | ($urandom & 32'hFFFFFF);
      sm = $urandom_range(0, lg);
      large_m = 25'(lg); small_m = 25'(sm);
      sign_l = 1'($urandom); sign_s = 1'($urandom); exp_in = 8'($urandom);
      ready = 1;
      @(negedge clk); ready = 0;
      check(done && sign_out == sign_l && exp_out == exp_in, "fields");
      check(sum == 26'((sign_l == sign_s) ? lg + sm : lg - sm), $sformatf("sum %h", sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
