// tb_xor_neuron: checks one neuron, y = sigmoid(x1*w1 + x2*w2 + theta), bit-exactly against
// the integer reference, for random operands with the inputs held until the result appears;
// the latency must be 3 clocks. Also counts results in each of the three sigmoid regions.
module tb_xor_neuron;
  import xor_pkg::*;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, valid_out;
  fx_t  x1, x2, w1, w2, theta, y;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0, n_lin = 0;

  xor_neuron u_dut (.clk, .rst_n, .valid_in, .x1, .x2, .w1, .w2, .theta, .y, .valid_out);

  always #5 clk = ~clk;

  initial begin
    valid_in = 1'b0; {x1, x2, w1, w2, theta} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      int e, cyc;
      x1 = fx_t'(rnd_fx(i % 2 ? 17 : 19)); x2 = fx_t'(rnd_fx(17));
      w1 = fx_t'(rnd_fx(18)); w2 = fx_t'(rnd_fx(18)); theta = fx_t'(rnd_fx(i % 5 == 0 ? 19 : 17));
      e = mneuron(x1, x2, w1, w2, theta);
      @(negedge clk);
      valid_in = 1'b1;
      @(negedge clk);
      valid_in = 1'b0;
      cyc = 1;
      while (!valid_out && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3) begin failures++; $display("FAIL: latency %0d", cyc); end
      checks++;
      if (y != fx_t'(e)) begin failures++; $display("FAIL: y %0d, expected %0d", y, e); end
      if (e == 0) n_lo++; else if (e == ONE) n_hi++; else n_lin++;
    end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_lin == 0) begin
      failures++; $display("FAIL: sigmoid regions %0d %0d %0d", n_lo, n_lin, n_hi);
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
