// tb_hum: end-to-end test of the Hardware Update Module through two FSL channel models.
//
// A processor model sends batches of 16 words {w, alpha, activation, error} x 4 on FSL0 and
// reads the four new values back from FSL1, comparing each with w + alpha*activation*error
// computed in real arithmetic (three roundings: 3 ulp of the larger term). It runs four
// phases: (1) one batch at a time, measuring the clocks per batch; (2) FSL0 data trickling
// in with gaps; (3) the next batch written before the previous results are read, so the HUM
// loads while it calculates; (4) a one-word FSL1 FIFO read slowly, so FSL1_M_Full stalls the
// output controller. Each of these events is counted and must occur.
module tb_hum;
  import tb_fp_pkg::*;
  import hum_pkg::*;

  logic clk = 0, rst_n = 0;
  // processor side of FSL0 and FSL1
  word_t m_data;  logic m_write = 0, m_full;
  word_t s_data;  logic s_read = 0, s_exists, s_ctrl;
  // HUM side
  word_t h0_data, h1_data; logic h0_ctrl, h0_exists, h0_read, h1_ctrl, h1_write, h1_full;
  hum_state_e state; logic exception;
  int drop0, drop1;
  int checks = 0, failures = 0;
  int out_depth = 16;

  always #5 clk = ~clk;

  fsl_fifo_model #(.DEPTH(32)) u_fsl0 (
    .clk, .rst_n, .FSL_M_Data(m_data), .FSL_M_Control(1'b0), .FSL_M_Write(m_write),
    .FSL_M_Full(m_full), .FSL_S_Data(h0_data), .FSL_S_Control(h0_ctrl), .FSL_S_Read(h0_read),
    .FSL_S_Exists(h0_exists), .dropped(drop0));

  // FSL1 with a run-time limit on its fill level to provoke Full
  fsl_fifo_model #(.DEPTH(16)) u_fsl1 (
    .clk, .rst_n, .FSL_M_Data(h1_data), .FSL_M_Control(h1_ctrl), .FSL_M_Write(h1_write),
    .FSL_M_Full(), .FSL_S_Data(s_data), .FSL_S_Control(s_ctrl), .FSL_S_Read(s_read),
    .FSL_S_Exists(s_exists), .dropped(drop1));
  always_comb h1_full = (u_fsl1.cnt >= out_depth);

  hum dut (
    .clk, .rst_n, .FSL0_S_Data(h0_data), .FSL0_S_Control(h0_ctrl), .FSL0_S_Exists(h0_exists),
    .FSL0_S_Read(h0_read), .FSL1_M_Data(h1_data), .FSL1_M_Control(h1_ctrl),
    .FSL1_M_Write(h1_write), .FSL1_M_Full(h1_full), .state, .exception);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // event counters
  int n_gap = 0, n_overlap = 0, n_full_stall = 0, n_threshold = 0;
  always @(posedge clk) if (rst_n) begin
    if (h0_read && state != WAITING) n_overlap++;
    if (state == SENDING && h1_full && dut.u_counter2.count < 3'(N_UNITS)) n_full_stall++;
  end

  localparam word_t ALPHA = 32'h3C23D70A;  // learning rate 0.01
  localparam word_t ONE   = 32'h3F800000;

  word_t sent [$];          // expected result queue: old, activation, error per unit

  task automatic put(input word_t w, input int gap);
    while (m_full) @(negedge clk);
    m_data = w; m_write = 1;
    @(negedge clk); m_write = 0;
    repeat (gap) @(negedge clk);
    if (gap > 0) n_gap++;
  endtask

  task automatic send_batch(input int gap_max);
    for (int u = 0; u < N_UNITS; u++) begin
      word_t w, a, e;
      w = rand_f(118, 126);
      a = ($urandom_range(0, 3) == 0) ? ONE : rand_f(115, 126);
      e = rand_f(110, 124);
      if (a == ONE) n_threshold++;
      put(w, 0); put(ALPHA, 0); put(a, $urandom_range(0, gap_max)); put(e, 0);
      sent.push_back(w); sent.push_back(a); sent.push_back(e);
    end
  endtask

  task automatic get_results(input int slow);
    for (int u = 0; u < N_UNITS; u++) begin
      word_t r, w, a, e;
      real ex, p, sc;
      repeat (slow) @(negedge clk);
      while (!s_exists) @(negedge clk);
      r = s_data; s_read = 1; @(negedge clk); s_read = 0;
      w = sent.pop_front(); a = sent.pop_front(); e = sent.pop_front();
      p  = f2r(ALPHA) * f2r(a) * f2r(e);
      ex = f2r(w) + p;
      sc = (absr(f2r(w)) > absr(p)) ? absr(f2r(w)) : absr(p);
      check(absr(f2r(r) - ex) <= 3.0 * sc / 8388608.0 + 1.0e-30,
            $sformatf("result %g expected %g", f2r(r), ex));
    end
  endtask

  initial begin
    int t0, t1, cyc;
    m_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // phase 1: one batch at a time, clocks per batch
    for (int b = 0; b < 20; b++) begin
      t0 = $time;
      send_batch(0);
      get_results(0);
      t1 = $time;
      cyc = (t1 - t0) / 10;
      if (b == 0) $display("clocks per batch (processor model included): %0d", cyc);
      check(cyc <= 45, $sformatf("batch took %0d clocks", cyc));
    end
    // phase 2: gaps in FSL0 data
    for (int b = 0; b < 20; b++) begin send_batch(3); get_results(0); end
    // phase 3: next batch sent before the previous results are read
    send_batch(0);
    for (int b = 0; b < 20; b++) begin send_batch(0); get_results(0); end
    get_results(0);
    // phase 4: FSL1 holds a single word and is read slowly
    out_depth = 1;
    for (int b = 0; b < 10; b++) begin send_batch(0); get_results(4); end
    check(drop0 == 0 && drop1 == 0, "no FSL word lost");
    check(!exception, "no arithmetic exception");
    check(n_gap > 0,        $sformatf("FSL0 gaps seen: %0d", n_gap));
    check(n_overlap > 0,    $sformatf("loads during calculation: %0d", n_overlap));
    check(n_full_stall > 0, $sformatf("FSL1 full stalls: %0d", n_full_stall));
    check(n_threshold > 0,  $sformatf("threshold updates: %0d", n_threshold));
    $display("events: gaps=%0d overlap=%0d full_stall=%0d thresholds=%0d",
             n_gap, n_overlap, n_full_stall, n_threshold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
