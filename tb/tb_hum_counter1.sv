// tb_hum_counter1: checks the FSL0 fetch: Read follows Exists while there is room, the 16
// words land in order in the 16 registers even when Exists drops mid-batch, Ready_cal rises
// exactly one clock after the 16th word, no word is read while a full batch is held, and
// 'consume' frees the registers for the next batch.
module tb_hum_counter1;
  import hum_pkg::*;
  logic clk = 0, rst_n = 0, fsl_s_exists = 0, consume = 0;
  word_t fsl_s_data;
  logic fsl_s_read, ready_cal;
  word_t params [BATCH_WORDS];
  int checks = 0, failures = 0;
  hum_counter1 dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    word_t exp_w [BATCH_WORDS];
    int n, gaps;
    fsl_s_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      n = 0; gaps = 0;
      while (n < BATCH_WORDS) begin
        fsl_s_exists = (b % 2 == 0) ? 1'b1 : 1'($urandom);
        fsl_s_data   = $urandom;
        #1;
        check(fsl_s_read == fsl_s_exists, "Read follows Exists while there is room");
        check(!ready_cal, "Ready_cal low while loading");
        if (fsl_s_exists) begin exp_w[n] = fsl_s_data; n++; end else gaps++;
        @(negedge clk);
      end
      fsl_s_exists = 1; #1;
      check(!fsl_s_read, "no read once 16 words are held");
      check(!ready_cal, "Ready_cal comes one clock after the 16th word");
      @(negedge clk);
      check(ready_cal && !fsl_s_read, "Ready_cal at count 17, still no read");
      for (int i = 0; i < BATCH_WORDS; i++) check(params[i] == exp_w[i], $sformatf("param %0d", i));
      repeat ($urandom_range(0, 3)) begin @(negedge clk); check(ready_cal, "Ready_cal held"); end
      fsl_s_exists = 0;
      consume = 1; @(negedge clk); consume = 0; #1;
      check(!ready_cal, "consume clears Ready_cal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
