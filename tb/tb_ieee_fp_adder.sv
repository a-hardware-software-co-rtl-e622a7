// tb_ieee_fp_adder: self-checking test of the single-precision adder.
// Directed cases are compared bit for bit (exactly representable sums, A + (-A), zero
// operands, an infinity operand); random cases are compared with the exact real sum within
// one unit in the last place. The latency of six clocks is checked, and a pipelined burst of
// one operand pair per clock is checked in order.
module tb_ieee_fp_adder;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, ready = 0;
  logic [31:0] a, b, result;
  logic done, exception;
  int checks = 0, failures = 0;

  ieee_fp_adder dut (.*);
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

  logic [31:0] r, xs[64], ys[64];
  logic exc;
  int lat, k;

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    one(32'h3FC00000, 32'h40100000, r, exc, lat);           // 1.5 + 2.25 = 3.75
    check(r == 32'h40700000 && !exc, $sformatf("1.5+2.25 got %h", r));
    check(lat == 6, $sformatf("latency %0d, expected 6", lat));
    one(32'h40490FDB, 32'hC0490FDB, r, exc, lat);           // pi + (-pi) = 0
    check(r == 32'h0, $sformatf("x-x got %h", r));
    one(32'h00000000, 32'hBF800000, r, exc, lat);           // 0 + (-1) = -1
    check(r == 32'hBF800000, $sformatf("0-1 got %h", r));
    one(32'h3F800000, 32'h3F800000, r, exc, lat);           // 1 + 1 = 2 (mantissa carry)
    check(r == 32'h40000000, $sformatf("1+1 got %h", r));
    one(32'h40000000, 32'hBFC00000, r, exc, lat);           // 2 - 1.5 = 0.5 (normalise)
    check(r == 32'h3F000000, $sformatf("2-1.5 got %h", r));
    one(32'h3F800000, 32'h33800000, r, exc, lat);           // 1 + 2^-24: tie rounds up
    check(r == 32'h3F800001, $sformatf("1+2^-24 got %h", r));
    one(32'h7F800000, 32'h3F800000, r, exc, lat);           // inf operand -> exception
    check(exc == 1'b1 && r == 0, "infinity operand must raise the exception");
    one(32'h7F7FFFFF, 32'h7F7FFFFF, r, exc, lat);           // overflow -> exception
    check(exc == 1'b1, "overflow must raise the exception");
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, y;
      x = rand_f(110, 140); y = rand_f(110, 140);
      one(x, y, r, exc, lat);
      check(!exc && close_enough(r, f2r(x) + f2r(y), 1.0),
            $sformatf("%h + %h got %h (%g vs %g)", x, y, r, f2r(r), f2r(x) + f2r(y)));
    end
    // burst: one pair per clock, results come back in order
    for (int i = 0; i < 64; i++) begin xs[i] = rand_f(120, 130); ys[i] = rand_f(120, 130); end
    fork
      begin
        for (int i = 0; i < 64; i++) begin @(negedge clk); a = xs[i]; b = ys[i]; ready = 1; end
        @(negedge clk); ready = 0;
      end
      begin
        k = 0;
        while (k < 64) begin
          @(posedge clk); #1;
          if (done) begin
            check(close_enough(result, f2r(xs[k]) + f2r(ys[k]), 1.0), $sformatf("burst %0d", k));
            k++;
          end
        end
      end
    join
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
