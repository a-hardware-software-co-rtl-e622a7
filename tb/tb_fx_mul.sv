// tb_fx_mul: checks the pipelined signed 1-3-16 multiplier against the integer reference
// (product of magnitudes shifted right by 16, saturated, sign restored): random operands of
// several magnitudes, overflow cases, one product per clock, two clocks of latency.
module tb_fx_mul;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        valid_in, valid_out;
  logic [19:0] a, b, p;
  int checks = 0, failures = 0, sat_seen = 0;
  int qa[$], qb[$];

  fx_mul u_dut (.clk, .rst_n, .valid_in, .a, .b, .p, .valid_out);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n && valid_out) begin
    int ea, eb, exp_p;
    ea = qa.pop_front(); eb = qb.pop_front();
    exp_p = mmul(ea, eb);
    if (exp_p == MAXV || exp_p == -MAXV) sat_seen++;
    checks++;
    if (s20(p) != exp_p) begin
      failures++; $display("FAIL: %0d * %0d -> %0d, expected %0d", ea, eb, s20(p), exp_p);
    end
  end

  initial begin
    valid_in = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency
    a = 20'(3 * ONE / 2); b = 20'(-2 * ONE); valid_in = 1'b1; qa.push_back(s20(a)); qb.push_back(s20(b));
    @(negedge clk); valid_in = 1'b0;
    checks++; if (valid_out) begin failures++; $display("FAIL: latency 1"); end
    @(negedge clk);
    checks++; if (!valid_out) begin failures++; $display("FAIL: latency not 2"); end
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      int ra, rb, bits;
      bits = (i % 3 == 0) ? 19 : (i % 3 == 1) ? 17 : 14;
      ra = rnd_fx(bits); rb = rnd_fx(bits);
      if (i % 97 == 0) ra = MINV;
      a = 20'(ra); b = 20'(rb); valid_in = ($urandom_range(3) != 0);
      if (valid_in) begin qa.push_back(ra); qb.push_back(rb); end
      @(negedge clk);
    end
    valid_in = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (qa.size() != 0) begin failures++; $display("FAIL: %0d results missing", qa.size()); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
