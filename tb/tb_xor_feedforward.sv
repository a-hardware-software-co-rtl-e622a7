// tb_xor_feedforward: checks the forward pass of the 2-2-1 network (hidden activations b1,
// b2 and output c) bit-exactly against the integer reference, for random weights and for
// the four XOR input patterns as well as random inputs. The latency must be 6 clocks.
module tb_xor_feedforward;
  import xor_pkg::*;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, valid_out;
  fx_t  in1, in2, b1, b2, c;
  xor_weights_t wt;
  int checks = 0, failures = 0;

  xor_feedforward u_dut (.clk, .rst_n, .valid_in, .in1, .in2, .wt, .b1, .b2, .c, .valid_out);

  always #5 clk = ~clk;

  initial begin
    valid_in = 1'b0; in1 = '0; in2 = '0; wt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      wvec_t w;
      int eb1, eb2, ec, cyc;
      for (int k = 0; k < 9; k++) w[k] = rnd_fx(18);
      wt = '{v11: w[0], v21: w[1], v12: w[2], v22: w[3], w11: w[4], w21: w[5],
             th_h1: w[6], th_h2: w[7], th_o: w[8]};
      if (i < 400) begin in1 = fx_t'((i % 2) * ONE); in2 = fx_t'(((i / 2) % 2) * ONE); end
      else begin in1 = fx_t'($urandom_range(ONE)); in2 = fx_t'($urandom_range(ONE)); end
      mforward(w, in1, in2, eb1, eb2, ec);
      @(negedge clk);
      valid_in = 1'b1;
      @(negedge clk);
      valid_in = 1'b0;
      cyc = 1;
      while (!valid_out && cyc < 30) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 6) begin failures++; $display("FAIL: latency %0d", cyc); end
      checks++;
      if (b1 != fx_t'(eb1) || b2 != fx_t'(eb2) || c != fx_t'(ec)) begin
        failures++; $display("FAIL: b1 %0d/%0d b2 %0d/%0d c %0d/%0d", b1, eb1, b2, eb2, c, ec);
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
