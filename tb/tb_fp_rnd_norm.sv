// tb_fp_rnd_norm: checks the two-stage normalise-and-round block on 25-bit mantissas with
// leading zeros: the packed result must be the value rounded to nearest (guard bit added),
// it must appear two clocks after ready, and exceptions must travel with the data.
module tb_fp_rnd_norm;
  logic clk = 0, rst_n = 0, ready = 0, exception_in = 0, round = 1;
  logic [33:0] in1;
  logic [31:0] out1;
  logic done, exception_out;
  int checks = 0, failures = 0;
  fp_rnd_norm dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    in1 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [24:0] m, n;
      logic [24:0] up;
      int sh, e;
      sh = $urandom_range(0, 10);
      e  = $urandom_range(20, 230);
      m  = (25'($urandom) | 25'h1000000) >> sh;
      n  = m << sh;
      in1 = {1'($urandom), 8'(e), m}; exception_in = (i % 31 == 0);
      ready = 1;
      @(negedge clk); ready = 0;
      check(!done, "not done after one clock");
      @(negedge clk);
      check(done, "done after two clocks");
      up = {1'b0, n[24:1]} + 25'(n[0]);
      if (exception_in) check(exception_out && out1 == 0, "exception travels");
      else if (up[24]) check(out1 == {in1[33], 8'(e - sh + 1), 23'd0}, "carry");
      else check(out1 == {in1[33], 8'(e - sh), up[22:0]}, $sformatf("got %h", out1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
