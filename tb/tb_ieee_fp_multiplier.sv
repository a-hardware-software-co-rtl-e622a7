// tb_ieee_fp_multiplier: self-checking test of the single-precision multiplier.
// Directed products are compared bit for bit (exact products, zero, infinity, overflow,
// underflow); random products are compared with the exact real product (a double holds the
// 48-bit mantissa product exactly) within half a unit in the last place (round to nearest). Latency must be 3.
module tb_ieee_fp_multiplier;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, ready = 0;
  logic [31:0] a, b, result;
  logic done, exception;
  int checks = 0, failures = 0;

  ieee_fp_multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic one(input logic [31:0] x, input logic [31:0] y, output logic [31:0] r,
                     output logic exc, output int lat);
    @(negedge clk); a = x; b = y; ready = 1;
    @(negedge clk); ready = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r = result; exc = exception;
  endtask

  logic [31:0] r;
  logic exc;
  int lat;

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    one(32'h40400000, 32'h3F000000, r, exc, lat);   // 3 * 0.5 = 1.5
    check(r == 32'h3FC00000 && !exc, $sformatf("3*0.5 got %h", r));
    check(lat == 3, $sformatf("latency %0d, expected 3", lat));
    one(32'h3FC00000, 32'hC0000000, r, exc, lat);   // 1.5 * -2 = -3
    check(r == 32'hC0400000, $sformatf("1.5*-2 got %h", r));
    one(32'h3FC00000, 32'h3FC00000, r, exc, lat);   // 1.5 * 1.5 = 2.25 (two integer bits)
    check(r == 32'h40100000, $sformatf("1.5*1.5 got %h", r));
    one(32'h00000000, 32'h42F60000, r, exc, lat);   // 0 * 123 = 0
    check(r == 32'h0 && !exc, $sformatf("0*x got %h", r));
    one(32'h3C23D70A, 32'h3F800000, r, exc, lat);   // 0.01 * 1 = 0.01
    check(r == 32'h3C23D70A, $sformatf("0.01*1 got %h", r));
    one(32'h7F800000, 32'h3F800000, r, exc, lat);   // inf operand
    check(exc && r == 0, "infinity operand must raise the exception");
    one(32'h7F000000, 32'h7F000000, r, exc, lat);   // overflow
    check(exc, "overflow must raise the exception");
    one(32'h00800000, 32'h00800000, r, exc, lat);   // underflow flushes to zero
    check(!exc && r == 0, $sformatf("underflow got %h", r));
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, y;
      x = rand_f(100, 150); y = rand_f(100, 150);
      one(x, y, r, exc, lat);
      check(!exc && close_enough(r, f2r(x) * f2r(y), 0.5),
            $sformatf("%h * %h got %h (%g vs %g)", x, y, r, f2r(r), f2r(x) * f2r(y)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
