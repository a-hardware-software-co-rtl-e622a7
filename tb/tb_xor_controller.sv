// tb_xor_controller: checks the pattern sequencer of the XOR network against a model of its
// order of events. Module 'done' signals are returned after random delays. In recall mode
// only the forward pass may start; in training mode forward, backward and update must start
// in that order, each once, followed by exactly one weight write, and 'done' must pulse once
// at the end. 'busy' must be high from the clock after 'start' until 'done'. Both modes and
// starts ignored while busy are counted.
module tb_xor_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, train, ff_done, bw_done, upd_done;
  logic ff_start, bw_start, upd_start, wr_en, done, busy;
  int checks = 0, failures = 0, n_train = 0, n_recall = 0;
  int n_ff, n_bw, n_upd, n_wr, n_done;
  int order [$];

  xor_controller u_dut (.clk, .rst_n, .start, .train, .ff_done, .bw_done, .upd_done,
                        .ff_start, .bw_start, .upd_start, .wr_en, .done, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responder: each module answers its start pulse after a random delay
  initial begin
    ff_done = 1'b0; bw_done = 1'b0; upd_done = 1'b0;
    forever begin
      @(negedge clk);
      ff_done = 1'b0; bw_done = 1'b0; upd_done = 1'b0;
      if (ff_start || bw_start || upd_start) begin
        logic [2:0] which;
        which = {upd_start, bw_start, ff_start};
        order.push_back(int'(which));
        repeat ($urandom_range(9)) @(negedge clk);
        ff_done = which[0]; bw_done = which[1]; upd_done = which[2];
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin n_wr++; order.push_back(8); end
    if (done)  n_done++;
  end

  initial begin
    start = 1'b0; train = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy, "idle after reset");
    for (int p = 0; p < 400; p++) begin
      bit tr;
      int cyc;
      tr = ($urandom_range(1) != 0);
      order.delete(); n_wr = 0; n_done = 0;
      train = tr; start = 1'b1;
      @(negedge clk);
      start = 1'b0; train = !tr;          // train is sampled with start only
      cyc = 0;
      while (!done && cyc < 200) begin
        check(busy, "busy during pattern");
        start = ($urandom_range(7) == 0);   // ignored while busy
        @(negedge clk); cyc++;
      end
      start = 1'b0;
      @(negedge clk);
      check(!busy, "idle after done");
      if (tr) begin
        n_train++;
        check(order.size() == 4 && order[0] == 1 && order[1] == 2 && order[2] == 4 && order[3] == 8,
              $sformatf("training order %p", order));
      end else begin
        n_recall++;
        check(order.size() == 1 && order[0] == 1, $sformatf("recall order %p", order));
      end
      check(n_done == 1, "one done per pattern");
      repeat ($urandom_range(3)) @(negedge clk);
    end
    check(n_train > 0 && n_recall > 0, "both modes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
