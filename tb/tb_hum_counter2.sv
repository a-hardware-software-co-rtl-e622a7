// tb_hum_counter2: checks the FSL1 send: four words in unit order, one per clock, Write high
// for exactly four clocks when the FIFO is never full, Done_out in the fifth clock, stalls
// while Full is high, and Control always '0'.
module tb_hum_counter2;
  import hum_pkg::*;
  logic clk = 0, rst_n = 0, start_out = 0, fsl_m_full = 0;
  word_t results [N_UNITS];
  word_t fsl_m_data;
  logic fsl_m_write, fsl_m_control, done_out;
  int checks = 0, failures = 0;
  hum_counter2 dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    int got, cyc, stalls;
    foreach (results[i]) results[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      foreach (results[i]) results[i] = $urandom;
      start_out = 1; got = 0; cyc = 0; stalls = 0;
      while (!done_out) begin
        fsl_m_full = (t % 2 == 1) ? 1'($urandom_range(0, 2) == 0) : 1'b0;
        #1;
        check(!fsl_m_control, "control bit is 0");
        if (fsl_m_full) begin check(!fsl_m_write, "no write while full"); stalls++; end
        if (fsl_m_write) begin
          check(fsl_m_data == results[got], $sformatf("word %0d", got));
          got++;
        end
        @(negedge clk); cyc++;
        if (cyc > 100) break;
      end
      fsl_m_full = 0;
      check(got == N_UNITS, "four words sent");
      check(cyc == N_UNITS + stalls, $sformatf("one word per free clock (%0d clocks)", cyc));
      start_out = 0; @(negedge clk); #1;
      check(!done_out && !fsl_m_write, "idle after Start_out falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
