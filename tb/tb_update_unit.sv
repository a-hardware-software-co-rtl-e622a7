// tb_update_unit: self-checking test of one weight-update unit.
// Random weight updates w + alpha * b * d (alpha = 0.01 as in the face-recognition network)
// and threshold updates (b = 1.0) are compared with the exact real value; three roundings
// are allowed for (3 ulp of the largest term). The done flag must stay high until ack, and
// the result must be ready 14 clocks after start.
module tb_update_unit;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ack = 0;
  logic [31:0] op1, op2, op3, op4, result;
  logic done, exception;
  int checks = 0, failures = 0;

  update_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(input logic [31:0] hw, input real exact, input real scale);
    return absr(f2r(hw) - exact) <= 3.0 * scale / 8388608.0 + 1.0e-30;
  endfunction

  localparam logic [31:0] ALPHA = 32'h3C23D70A;  // 0.01
  localparam logic [31:0] ONE   = 32'h3F800000;

  initial begin
    int lat;
    real w, p, ex, sc;
    logic [31:0] s1, s3, s4;
    op1 = 0; op2 = 0; op3 = 0; op4 = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      op1 = rand_f(118, 126);                         // |w| < 0.5
      op2 = ALPHA;
      op3 = (i % 5 == 0) ? ONE : rand_f(115, 126);    // activation (or 1.0 for a threshold)
      op4 = rand_f(110, 124);                         // error term
      s1 = op1; s3 = op3; s4 = op4;
      start = 1;
      @(negedge clk); start = 0;
      op1 = 32'hDEADBEEF; op2 = 32'hDEADBEEF;       // operands must have been latched
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      if (i == 0) check(lat == 14, $sformatf("latency %0d, expected 14", lat));
      w  = f2r(s1);
      p  = f2r(ALPHA) * f2r(s3) * f2r(s4);
      ex = w + p;
      sc = (absr(w) > absr(p)) ? absr(w) : absr(p);
      check(!exception && near(result, ex, sc), $sformatf("update %0d got %g exp %g", i, f2r(result), ex));
      repeat (2) @(negedge clk);
      check(done == 1'b1, "done must hold until ack");
      ack = 1; @(negedge clk); ack = 0;
      check(done == 1'b0, "done must clear on ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
