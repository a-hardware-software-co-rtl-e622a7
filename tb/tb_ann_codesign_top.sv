// tb_ann_codesign_top: end-to-end test of the whole design at its default sizes.
//
// Two things run at the same time on the top:
//  * A processor model carries out one complete hardware-assisted update() of the 400-8-4
//    face-recognition network (Table of chosen parameters: weights in [-0.5, 0.5], thresholds
//    in [0, 0.5], learning rate 0.01). It streams all 3200 input-to-hidden weights, 32
//    hidden-to-output weights and 12 thresholds through the HUM in 811 batches of four, in the
//    order of the software's update loop (thresholds last, with activation 1.0), over two
//    16-word FSL FIFO models, and writes each returned value back into its own copy of the
//    parameters. Every value is compared with w + alpha*activation*error computed in real
//    arithmetic (three roundings: 3 ulp of the larger term). Some batches are sent with gaps
//    between words, some pairs are sent before either's results are read (the HUM loads while
//    it calculates), and some are read back slowly through a one-word FSL1 (FSL1_M_Full
//    stalls the HUM). A last batch overflows single precision and must raise 'exception',
//    and the batch after it must clear it.
//  * The XOR network is loaded with a fixed start and trained for 300 epochs in training mode,
//    checked bit-exactly against an integer reference after every pattern, then asked for
//    its four answers in recall mode, which must all be right.
// The fixed-point operators on the top's own ports are checked against integer arithmetic.
// Each mechanism (gaps, overlap, FSL1 stall, threshold update, exception, training, recall,
// serial multiplication) is counted, and one that never happened is a failure.
module tb_ann_codesign_top;
  import tb_fp_pkg::*;
  import tb_xor_pkg::*;
  import hum_pkg::*;
  import xor_pkg::*;

  localparam int NI = 400, NH = 8, NO = 4;
  localparam int NV = NI * NH, NW = NH * NO, NP = NV + NW + NH + NO;   // 3244 parameters
  localparam int NB = NP / N_UNITS;                                    // 811 batches
  localparam word_t ALPHA = 32'h3C23D70A;  // 0.01
  localparam word_t FONE  = 32'h3F800000;  // 1.0

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------- top ----------------
  word_t h0_data, h1_data;
  logic  h0_ctrl, h0_exists, h0_read, h1_ctrl, h1_write, h1_full;
  hum_state_e hum_state;
  logic hum_exception;
  logic xor_load, xor_start, xor_train, xor_busy, xor_done;
  xor_weights_t xor_load_wt, xor_wt;
  fx_t xor_in1, xor_in2, xor_target, xor_alpha, xor_out;
  fx_t cla_op1, cla_op2;
  logic cla_cin;
  logic [FX_W:0] cla_sum;
  logic [FX_W-1:0] mul_a, mul_b;
  logic [2*FX_W-1:0] pmul_product, smul_product, smul_partial;
  logic smul_start, smul_busy, smul_done;

  ann_codesign_top dut (
    .clk, .rst_n,
    .FSL0_S_Data(h0_data), .FSL0_S_Control(h0_ctrl), .FSL0_S_Exists(h0_exists),
    .FSL0_S_Read(h0_read), .FSL1_M_Data(h1_data), .FSL1_M_Control(h1_ctrl),
    .FSL1_M_Write(h1_write), .FSL1_M_Full(h1_full), .hum_state, .hum_exception,
    .xor_load, .xor_load_wt, .xor_start, .xor_train, .xor_in1, .xor_in2, .xor_target,
    .xor_alpha, .xor_out, .xor_wt, .xor_busy, .xor_done,
    .cla_op1, .cla_op2, .cla_cin, .cla_sum, .mul_a, .mul_b, .pmul_product, .smul_start,
    .smul_product, .smul_partial, .smul_busy, .smul_done);

  // ---------------- FSL channels ----------------
  word_t m_data, s_data;
  logic  m_write = 1'b0, m_full, s_read = 1'b0, s_exists, s_ctrl;
  int    drop0, drop1, out_depth = 16;

  fsl_fifo_model #(.DEPTH(16)) u_fsl0 (
    .clk, .rst_n, .FSL_M_Data(m_data), .FSL_M_Control(1'b0), .FSL_M_Write(m_write),
    .FSL_M_Full(m_full), .FSL_S_Data(h0_data), .FSL_S_Control(h0_ctrl), .FSL_S_Read(h0_read),
    .FSL_S_Exists(h0_exists), .dropped(drop0));
  fsl_fifo_model #(.DEPTH(16)) u_fsl1 (
    .clk, .rst_n, .FSL_M_Data(h1_data), .FSL_M_Control(h1_ctrl), .FSL_M_Write(h1_write),
    .FSL_M_Full(), .FSL_S_Data(s_data), .FSL_S_Control(s_ctrl), .FSL_S_Read(s_read),
    .FSL_S_Exists(s_exists), .dropped(drop1));
  always_comb h1_full = (u_fsl1.cnt >= out_depth);

  int checks = 0, failures = 0;
  int n_gap = 0, n_overlap = 0, n_stall = 0, n_threshold = 0, n_exception = 0;
  int n_train = 0, n_recall = 0, n_smul = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (h0_read && hum_state != WAITING) n_overlap++;
    if (hum_state == SENDING && h1_full && !h1_write) n_stall++;
    if (h1_write && h1_full) begin
      failures++; $display("FAIL: FSL1 written while full");
    end
  end

  // ---------------- processor model ----------------
  // flat parameter store: v[i][h] at i*NH+h, w[h][o] at NV+h*NO+o, th_h at NV+NW+h,
  // th_o at NV+NW+NH+o; act/err hold the activation and error each parameter is updated with
  word_t par [NP], act [NP], err [NP];
  int    order [NB][N_UNITS];
  word_t exp_old [$], exp_act [$], exp_err [$];
  int    exp_idx [$];
  int    n_written = 0;

  function automatic word_t pos(input word_t x);
    return {1'b0, x[30:0]};
  endfunction

  task automatic put(input word_t wd, input int gap);
    while (m_full) @(negedge clk);
    m_data = wd; m_write = 1'b1;
    @(negedge clk);
    m_write = 1'b0;
    if (gap > 0) begin repeat (gap) @(negedge clk); n_gap++; end
  endtask

  task automatic send_words(input word_t o [N_UNITS], input word_t ac [N_UNITS],
                            input word_t er [N_UNITS], input int gap_max);
    for (int u = 0; u < N_UNITS; u++) begin
      put(o[u], 0); put(ALPHA, 0); put(ac[u], $urandom_range(gap_max)); put(er[u], 0);
      exp_old.push_back(o[u]); exp_act.push_back(ac[u]); exp_err.push_back(er[u]);
    end
  endtask

  task automatic send_batch(input int b, input int gap_max);
    word_t o [N_UNITS], ac [N_UNITS], er [N_UNITS];
    for (int u = 0; u < N_UNITS; u++) begin
      int k;
      k = order[b][u];
      o[u] = par[k]; ac[u] = act[k]; er[u] = err[k];
      exp_idx.push_back(k);
      if (act[k] == FONE) n_threshold++;
    end
    send_words(o, ac, er, gap_max);
  endtask

  task automatic get_word(input int slow, output word_t r);
    repeat (slow) @(negedge clk);
    while (!s_exists) @(negedge clk);
    r = s_data; s_read = 1'b1;
    @(negedge clk);
    s_read = 1'b0;
  endtask

  task automatic get_batch(input int slow, input bit store);
    for (int u = 0; u < N_UNITS; u++) begin
      word_t r, o, ac, er;
      real p, ex, sc;
      get_word(slow, r);
      o = exp_old.pop_front(); ac = exp_act.pop_front(); er = exp_err.pop_front();
      p  = f2r(ALPHA) * f2r(ac) * f2r(er);
      ex = f2r(o) + p;
      sc = (absr(f2r(o)) > absr(p)) ? absr(f2r(o)) : absr(p);
      check(absr(f2r(r) - ex) <= 3.0 * sc / 8388608.0 + 1.0e-30,
            $sformatf("updated value %g, expected %g", f2r(r), ex));
      if (store) begin par[exp_idx.pop_front()] = r; n_written++; end
    end
  endtask

  task automatic processor();
    word_t a [NI], bh [NH], d [NO], e [NH];
    word_t par_init [NP];
    int nb, t0;
    // network state after forward() and backward()
    for (int i = 0; i < NI; i++) a[i] = pos(rand_f(118, 126));
    for (int h = 0; h < NH; h++) begin bh[h] = pos(rand_f(120, 126)); e[h] = rand_f(112, 122); end
    for (int o = 0; o < NO; o++) d[o] = rand_f(115, 124);
    for (int i = 0; i < NI; i++) for (int h = 0; h < NH; h++) begin
      par[i*NH+h] = rand_f(117, 125); act[i*NH+h] = a[i]; err[i*NH+h] = e[h];
    end
    for (int h = 0; h < NH; h++) for (int o = 0; o < NO; o++) begin
      par[NV+h*NO+o] = rand_f(117, 125); act[NV+h*NO+o] = bh[h]; err[NV+h*NO+o] = d[o];
    end
    for (int h = 0; h < NH; h++) begin par[NV+NW+h] = pos(rand_f(117, 125)); act[NV+NW+h] = FONE; err[NV+NW+h] = e[h]; end
    for (int o = 0; o < NO; o++) begin par[NV+NW+NH+o] = pos(rand_f(117, 125)); act[NV+NW+NH+o] = FONE; err[NV+NW+NH+o] = d[o]; end
    par_init = par;
    // batch order of the update loop
    nb = 0;
    for (int i = 0; i < NI; i++) for (int g = 0; g < NH / N_UNITS; g++) begin
      for (int u = 0; u < N_UNITS; u++) order[nb][u] = i*NH + g*N_UNITS + u;
      nb++;
    end
    for (int h = 0; h < NH; h++) begin
      for (int u = 0; u < N_UNITS; u++) order[nb][u] = NV + h*NO + u;
      nb++;
    end
    for (int g = 0; g < (NH + NO) / N_UNITS; g++) begin
      for (int u = 0; u < N_UNITS; u++) order[nb][u] = NV + NW + g*N_UNITS + u;
      nb++;
    end
    check(nb == NB, $sformatf("%0d batches", nb));

    t0 = $time;
    for (int b = 0; b < NB; b++) begin
      if (b % 61 == 5 && b + 1 < NB) begin
        // two batches in flight
        send_batch(b, 0); send_batch(b + 1, 0);
        get_batch(0, 1'b1); get_batch(0, 1'b1);
        b++;
      end else if (b % 89 == 3) begin
        out_depth = 1;
        send_batch(b, 0); get_batch(5, 1'b1);
        out_depth = 16;
      end else if (b % 97 == 11) begin
        send_batch(b, 4); get_batch(0, 1'b1);
      end else begin
        send_batch(b, 0); get_batch(0, 1'b1);
      end
    end
    $display("update() of %0d parameters in %0d batches took %0d clocks (%0d per batch)",
             NP, NB, ($time - t0) / 10, ($time - t0) / 10 / NB);
    check(n_written == NP, $sformatf("%0d parameters written back", n_written));
    begin
      int changed = 0;
      for (int k = 0; k < NP; k++) if (par[k] != par_init[k]) changed++;
      check(changed > NP / 2, $sformatf("%0d parameters changed", changed));
    end
    check(!hum_exception, "no exception in normal data");
    // overflow: a huge weight plus a huge step
    begin
      word_t o [N_UNITS], ac [N_UNITS], er [N_UNITS];
      for (int u = 0; u < N_UNITS; u++) begin o[u] = 32'h7F000000; ac[u] = 32'h7E800000; er[u] = 32'h7E800000; end
      send_words(o, ac, er, 0);
      for (int u = 0; u < N_UNITS; u++) begin
        word_t r;
        get_word(0, r);
        void'(exp_old.pop_front()); void'(exp_act.pop_front()); void'(exp_err.pop_front());
      end
      check(hum_exception, "overflow raises exception");
      if (hum_exception) n_exception++;
      send_batch(0, 0); get_batch(0, 1'b0); void'(exp_idx.pop_front()); void'(exp_idx.pop_front());
      void'(exp_idx.pop_front()); void'(exp_idx.pop_front());
      check(!hum_exception, "exception clears with the next batch");
    end
    check(drop0 == 0 && drop1 == 0, "no FSL word lost");
  endtask

  // ---------------- XOR network ----------------
  function automatic wvec_t to_vec(input xor_weights_t s);
    return '{s.v11, s.v21, s.v12, s.v22, s.w11, s.w21, s.th_h1, s.th_h2, s.th_o};
  endfunction

  task automatic xor_run(input bit tr, input int x1, input int x2, input int t);
    xor_in1 = fx_t'(x1); xor_in2 = fx_t'(x2); xor_target = fx_t'(t); xor_train = tr;
    xor_start = 1'b1;
    @(negedge clk);
    xor_start = 1'b0;
    while (!xor_done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic xor_net();
    wvec_t w;
    int correct = 0;
    w = '{int'(fx_t'(20'h0eabd)), int'(fx_t'(20'hf112a)), int'(fx_t'(20'h0e787)),
          int'(fx_t'(20'hf3a0b)), int'(fx_t'(20'h0096c)), int'(fx_t'(20'hf4166)),
          int'(fx_t'(20'hfc036)), int'(fx_t'(20'h0f9f4)), int'(fx_t'(20'h074ab))};
    xor_load_wt = '{v11: w[0], v21: w[1], v12: w[2], v22: w[3], w11: w[4], w21: w[5],
                    th_h1: w[6], th_h2: w[7], th_o: w[8]};
    xor_load = 1'b1;
    @(negedge clk);
    xor_load = 1'b0;
    for (int ep = 0; ep < 300; ep++)
      for (int p = 0; p < 4; p++) begin
        int x1, x2, t;
        x1 = (p % 2) * ONE; x2 = (p / 2) * ONE; t = ((p % 2) ^ (p / 2)) * ONE;
        w = mtrain(w, xor_alpha, x1, x2, t);
        xor_run(1'b1, x1, x2, t);
        n_train++;
        check(to_vec(xor_wt) == w, $sformatf("XOR weights after epoch %0d pattern %0d", ep, p));
      end
    for (int p = 0; p < 4; p++) begin
      xor_run(1'b0, (p % 2) * ONE, (p / 2) * ONE, 0);
      n_recall++;
      if ((xor_out > fx_t'(ONE / 2)) == (((p % 2) ^ (p / 2)) != 0)) correct++;
    end
    $display("XOR network: %0d of 4 patterns right after 300 epochs", correct);
    check(correct == 4, "XOR learned");
  endtask

  // ---------------- fixed-point operators ----------------
  task automatic operators();
    for (int i = 0; i < 200; i++) begin
      logic [FX_W-1:0] ra, rb;
      cla_op1 = fx_t'($urandom); cla_op2 = fx_t'($urandom); cla_cin = 1'($urandom_range(1));
      ra = FX_W'($urandom); rb = FX_W'($urandom);
      mul_a = ra; mul_b = rb; smul_start = 1'b1;
      @(negedge clk);
      smul_start = 1'b0;
      check($signed(cla_sum) == (FX_W+1)'($signed(cla_op1) + $signed(cla_op2) + $signed({1'b0, cla_cin})),
            "carry-lookahead sum");
      check(pmul_product == (2*FX_W)'(ra) * (2*FX_W)'(rb), "parallel product");
      while (!smul_done) @(negedge clk);
      check(smul_product == (2*FX_W)'(ra) * (2*FX_W)'(rb), "serial product");
      n_smul++;
    end
  endtask

  initial begin
    m_data = '0;
    xor_load = 1'b0; xor_load_wt = '0; xor_start = 1'b0; xor_train = 1'b0;
    xor_in1 = '0; xor_in2 = '0; xor_target = '0; xor_alpha = fx_t'(ONE / 2);
    cla_op1 = '0; cla_op2 = '0; cla_cin = 1'b0; mul_a = '0; mul_b = '0; smul_start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      processor();
      xor_net();
      operators();
    join
    check(n_gap > 0,       $sformatf("FSL0 gaps: %0d", n_gap));
    check(n_overlap > 0,   $sformatf("loads during calculation: %0d", n_overlap));
    check(n_stall > 0,     $sformatf("FSL1 full stalls: %0d", n_stall));
    check(n_threshold > 0, $sformatf("threshold updates: %0d", n_threshold));
    check(n_exception > 0, $sformatf("exceptions: %0d", n_exception));
    check(n_train > 0,     $sformatf("XOR training patterns: %0d", n_train));
    check(n_recall > 0,    $sformatf("XOR recall patterns: %0d", n_recall));
    check(n_smul > 0,      $sformatf("serial multiplications: %0d", n_smul));
    $display("events: gaps=%0d overlap=%0d fsl1_stall=%0d thresholds=%0d exception=%0d xor_train=%0d xor_recall=%0d serial_mul=%0d",
             n_gap, n_overlap, n_stall, n_threshold, n_exception, n_train, n_recall, n_smul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
