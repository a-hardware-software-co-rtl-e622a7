// tb_xor_ann: trains the pure-hardware 2-2-1 network on XOR and checks every step bit-exactly.
//
// Two runs. The first starts from a fixed set of initial weights in [-1, 1] and trains for
// 300 epochs (learning rate 0.5), after which all four XOR patterns must be classified
// correctly (output above or below 0.5). The second starts from random initial weights in
// [-1, 1] and trains for 100 epochs. Weights are loaded through the load port. The four XOR
// patterns are presented in turn in training mode; after every
// pattern all nine weights and thresholds must equal those of the integer reference model,
// and the pattern must take 26 clocks from start to done. Every 25 epochs the four patterns
// are also presented in recall mode (8 clocks, output compared with the reference, weights
// unchanged). Whether a random start learns XOR depends on the start, so the second run only
// prints its classification count.
module tb_xor_ann;
  import xor_pkg::*;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, start, train, busy, done;
  xor_weights_t load_wt, wt;
  fx_t in1, in2, target, alpha, out;
  int checks = 0, failures = 0, n_train = 0, n_recall = 0;

  xor_ann u_dut (.clk, .rst_n, .load, .load_wt, .start, .train, .in1, .in2, .target, .alpha,
                 .out, .wt, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic wvec_t to_vec(input xor_weights_t s);
    return '{s.v11, s.v21, s.v12, s.v22, s.w11, s.w21, s.th_h1, s.th_h2, s.th_o};
  endfunction

  task automatic run(input bit tr, input int x1, input int x2, input int t, output int cyc);
    in1 = fx_t'(x1); in2 = fx_t'(x2); target = fx_t'(t); train = tr; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
  endtask

  // one training run from initial weights w; returns the number of patterns classified correctly
  task automatic train_run(input wvec_t w, input int epochs, output int correct);
    int cyc;
    load_wt = '{v11: w[0], v21: w[1], v12: w[2], v22: w[3], w11: w[4], w21: w[5],
                th_h1: w[6], th_h2: w[7], th_o: w[8]};
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(to_vec(wt) == w, "weights loaded");
    correct = 0;
    for (int ep = 0; ep < epochs; ep++) begin
      for (int p = 0; p < 4; p++) begin
        int x1, x2, t;
        x1 = (p % 2) * ONE; x2 = (p / 2) * ONE; t = ((p % 2) ^ (p / 2)) * ONE;
        w = mtrain(w, alpha, x1, x2, t);
        run(1'b1, x1, x2, t, cyc);
        n_train++;
        check(cyc == 26, $sformatf("training latency %0d", cyc));
        check(to_vec(wt) == w, $sformatf("epoch %0d pattern %0d weights %p, expected %p", ep, p, to_vec(wt), w));
        @(negedge clk);
      end
      if (ep % 25 == 24 || ep == epochs - 1) begin
        correct = 0;
        for (int p = 0; p < 4; p++) begin
          int x1, x2, b1, b2, c;
          x1 = (p % 2) * ONE; x2 = (p / 2) * ONE;
          mforward(w, x1, x2, b1, b2, c);
          run(1'b0, x1, x2, 0, cyc);
          n_recall++;
          check(cyc == 8, $sformatf("recall latency %0d", cyc));
          check(out == fx_t'(c), $sformatf("recall output %0d, expected %0d", out, c));
          check(to_vec(wt) == w, "recall leaves weights unchanged");
          if ((out > fx_t'(ONE / 2)) == (((p % 2) ^ (p / 2)) != 0)) correct++;
          @(negedge clk);
        end
      end
    end
  endtask

  initial begin
    wvec_t w;
    int correct;
    load = 1'b0; start = 1'b0; train = 1'b0; load_wt = '0;
    in1 = '0; in2 = '0; target = '0; alpha = fx_t'(ONE / 2);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    w = '{int'(fx_t'(20'h0eabd)), int'(fx_t'(20'hf112a)), int'(fx_t'(20'h0e787)),
          int'(fx_t'(20'hf3a0b)), int'(fx_t'(20'h0096c)), int'(fx_t'(20'hf4166)),
          int'(fx_t'(20'hfc036)), int'(fx_t'(20'h0f9f4)), int'(fx_t'(20'h074ab))};
    train_run(w, 300, correct);
    $display("fixed start, 300 epochs: %0d of 4 XOR patterns classified correctly", correct);
    check(correct == 4, "network has learned XOR");
    for (int k = 0; k < 9; k++) w[k] = rnd_fx(16);
    train_run(w, 100, correct);
    $display("random start, 100 epochs: %0d of 4 XOR patterns classified correctly", correct);
    $display("training patterns %0d, recall patterns %0d", n_train, n_recall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
