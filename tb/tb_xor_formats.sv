// tb_xor_formats: builds the XOR network in the three evaluated number formats and trains each.
//
// Three xor_ann instances are elaborated with INT_LENS = 4, 5 and 6 (1-3-16, 1-4-16 and
// 1-5-16; 20, 21 and 22 bits). They are exercised one after another, because the reference
// model's saturation range is set per format. Each format gets two runs:
//  - the fixed start of tb_xor_ann with learning rate 0.5 for 300 epochs, after which all four
//    XOR patterns must be classified correctly;
//  - four stress runs of 25 epochs with a random learning rate between 1 and 4: the hidden
//    layer starts small and random, the two output weights just below the format's maximum
//    and the output threshold just above its minimum. The output neuron's sum and the weight
//    updates then saturate at the format's own limits.
// After every training pattern all nine parameters must equal the reference model for that
// format, and the pattern must take 26 clocks. The reference model counts its saturations;
// the stress runs must produce some in every format.
module tb_xor_formats;
  import tb_xor_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, turn = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < 3; g++) begin : g_fmt
    localparam int IL = 4 + g;
    localparam int W  = IL + FRAC;
    typedef logic signed [W-1:0] fw_t;

    logic load, start, train, busy, done;
    logic [9*W-1:0] load_wt, wt;
    fw_t in1, in2, target, alpha, out;

    xor_ann #(.INT_LENS(IL), .FRAC_LENS(FRAC)) u_dut (
      .clk, .rst_n, .load, .load_wt, .start, .train, .in1, .in2, .target, .alpha, .out, .wt,
      .busy, .done);

    function automatic wvec_t to_vec(input logic [9*W-1:0] v);
      wvec_t r;
      for (int k = 0; k < 9; k++) r[k] = int'(fw_t'(v[(8-k)*W +: W]));
      return r;
    endfunction

    function automatic logic [9*W-1:0] from_vec(input wvec_t w);
      logic [9*W-1:0] v;
      for (int k = 0; k < 9; k++) v[(8-k)*W +: W] = fw_t'(w[k]);
      return v;
    endfunction

    task automatic run(input bit tr, input int x1, input int x2, input int t, output int cyc);
      in1 = fw_t'(x1); in2 = fw_t'(x2); target = fw_t'(t); train = tr; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    endtask

    // trains from w; returns the number of XOR patterns classified correctly afterwards
    task automatic train_run(input wvec_t w, input int al, input int epochs, output int correct);
      int cyc;
      alpha = fw_t'(al);
      load_wt = from_vec(w);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(to_vec(wt) == w, $sformatf("1-%0d-16 weights loaded", IL - 1));
      for (int ep = 0; ep < epochs; ep++) begin
        for (int p = 0; p < 4; p++) begin
          int x1, x2, t;
          x1 = (p % 2) * ONE; x2 = (p / 2) * ONE; t = ((p % 2) ^ (p / 2)) * ONE;
          w = mtrain(w, al, x1, x2, t);
          run(1'b1, x1, x2, t, cyc);
          check(cyc == 26, $sformatf("1-%0d-16 training latency %0d", IL - 1, cyc));
          check(to_vec(wt) == w, $sformatf("1-%0d-16 epoch %0d pattern %0d weights %p, expected %p",
                                           IL - 1, ep, p, to_vec(wt), w));
          @(negedge clk);
        end
      end
      correct = 0;
      for (int p = 0; p < 4; p++) begin
        int x1, x2, b1, b2, c;
        x1 = (p % 2) * ONE; x2 = (p / 2) * ONE;
        mforward(w, x1, x2, b1, b2, c);
        run(1'b0, x1, x2, 0, cyc);
        check(out == fw_t'(c), $sformatf("1-%0d-16 recall output %0d, expected %0d", IL - 1, out, c));
        if ((out > fw_t'(ONE / 2)) == (((p % 2) ^ (p / 2)) != 0)) correct++;
        @(negedge clk);
      end
    endtask

    initial begin
      wvec_t w;
      int correct, clamps;
      load = 1'b0; start = 1'b0; train = 1'b0; load_wt = '0;
      in1 = '0; in2 = '0; target = '0; alpha = '0;
      wait (turn == g && rst_n);
      set_int_lens(IL);
      @(negedge clk);
      w = '{s20(20'h0eabd), s20(20'hf112a), s20(20'h0e787), s20(20'hf3a0b), s20(20'h0096c),
            s20(20'hf4166), s20(20'hfc036), s20(20'h0f9f4), s20(20'h074ab)};
      train_run(w, ONE / 2, 300, correct);
      $display("1-%0d-16: fixed start, 300 epochs: %0d of 4 XOR patterns correct", IL - 1, correct);
      check(correct == 4, $sformatf("1-%0d-16 network has learned XOR", IL - 1));
      clamps = n_clamp;
      for (int r = 0; r < 4; r++) begin
        for (int k = 0; k < 9; k++) w[k] = rnd_fx(16);
        w[4] = ref_max - int'($urandom_range(ONE / 4));
        w[5] = ref_max - int'($urandom_range(ONE / 4));
        w[8] = -ref_max - 1 + int'($urandom_range(ONE / 4));
        train_run(w, int'($urandom_range(4 * ONE, ONE)), 25, correct);
      end
      clamps = n_clamp - clamps;
      $display("1-%0d-16: stress runs, %0d saturations in the reference", IL - 1, clamps);
      check(clamps > 0, $sformatf("1-%0d-16 saturation exercised", IL - 1));
      turn = g + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (turn == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
