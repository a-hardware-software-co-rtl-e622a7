// tb_xor_backward: checks the error terms d = c(1-c)(t-c) and e_h = b_h(1-b_h) w_h d
// bit-exactly against the integer reference, for random activations in [0, 1], targets 0
// and 1 and random weights; inputs change right after the start pulse to show that they are
// latched. The latency must be 9 clocks.
module tb_xor_backward;
  import xor_pkg::*;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, valid_out;
  fx_t  b1, b2, c, target, w11, w21, d, e1, e2;
  int checks = 0, failures = 0;

  xor_backward u_dut (.clk, .rst_n, .valid_in, .b1, .b2, .c, .target, .w11, .w21,
                      .d, .e1, .e2, .valid_out);

  always #5 clk = ~clk;

  initial begin
    valid_in = 1'b0; {b1, b2, c, target, w11, w21} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      int ed, ee1, ee2, cyc;
      b1 = fx_t'($urandom_range(ONE)); b2 = fx_t'($urandom_range(ONE));
      c = fx_t'($urandom_range(ONE)); target = fx_t'($urandom_range(1) * ONE);
      w11 = fx_t'(rnd_fx(i % 4 == 0 ? 19 : 18)); w21 = fx_t'(rnd_fx(18));
      mbackward(b1, b2, c, target, w11, w21, ed, ee1, ee2);
      @(negedge clk);
      valid_in = 1'b1;
      @(negedge clk);
      valid_in = 1'b0;
      {b1, b2, c, target, w11, w21} = '0;
      cyc = 1;
      while (!valid_out && cyc < 30) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 9) begin failures++; $display("FAIL: latency %0d", cyc); end
      checks++;
      if (d != fx_t'(ed) || e1 != fx_t'(ee1) || e2 != fx_t'(ee2)) begin
        failures++; $display("FAIL: d %0d/%0d e1 %0d/%0d e2 %0d/%0d", d, ed, e1, ee1, e2, ee2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
