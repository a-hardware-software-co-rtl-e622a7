// tb_xor_update: checks the parallel update of all nine weights and thresholds bit-exactly
// against the integer reference, for random learning rates, inputs, activations, error
// terms and old weights, with inputs changed right after the start pulse to show they are
// latched. The latency must be 6 clocks. Saturation at the format limits is provoked too.
module tb_xor_update;
  import xor_pkg::*;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in, valid_out;
  fx_t  alpha, in1, in2, b1, b2, d, e1, e2;
  xor_weights_t old_wt, new_wt;
  int checks = 0, failures = 0, n_sat = 0;

  xor_update u_dut (.clk, .rst_n, .valid_in, .alpha, .in1, .in2, .b1, .b2, .d, .e1, .e2,
                    .old_wt, .new_wt, .valid_out);

  always #5 clk = ~clk;

  function automatic wvec_t to_vec(input xor_weights_t s);
    return '{s.v11, s.v21, s.v12, s.v22, s.w11, s.w21, s.th_h1, s.th_h2, s.th_o};
  endfunction

  initial begin
    valid_in = 1'b0; {alpha, in1, in2, b1, b2, d, e1, e2} = '0; old_wt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      wvec_t w, e, got;
      int cyc;
      for (int k = 0; k < 9; k++) w[k] = rnd_fx(18);
      if (i % 10 == 0) w[i % 9] = (i % 20 == 0) ? MAXV - 5 : MINV + 5;
      old_wt = '{v11: w[0], v21: w[1], v12: w[2], v22: w[3], w11: w[4], w21: w[5],
                 th_h1: w[6], th_h2: w[7], th_o: w[8]};
      alpha = fx_t'($urandom_range(ONE)); if (i % 10 == 0) alpha = fx_t'(4 * ONE);
      in1 = fx_t'($urandom_range(ONE)); in2 = fx_t'($urandom_range(ONE));
      b1 = fx_t'($urandom_range(ONE)); b2 = fx_t'($urandom_range(ONE));
      d = fx_t'(rnd_fx(16)); e1 = fx_t'(rnd_fx(16)); e2 = fx_t'(rnd_fx(16));
      if (i % 10 == 0) begin d = fx_t'(rnd_fx(19)); e1 = fx_t'(rnd_fx(19)); e2 = fx_t'(rnd_fx(19)); end
      e = mupdate(w, alpha, in1, in2, b1, b2, d, e1, e2);
      for (int k = 0; k < 9; k++) if (e[k] == MAXV || e[k] == MINV) n_sat++;
      @(negedge clk);
      valid_in = 1'b1;
      @(negedge clk);
      valid_in = 1'b0;
      {alpha, in1, in2, b1, b2, d, e1, e2} = '0; old_wt = '0;
      cyc = 1;
      while (!valid_out && cyc < 30) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 6) begin failures++; $display("FAIL: latency %0d", cyc); end
      got = to_vec(new_wt);
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (got[k] != e[k]) begin failures++; $display("FAIL: param %0d = %0d, expected %0d", k, got[k], e[k]); end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
