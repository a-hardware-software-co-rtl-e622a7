// tb_fp_round_add: checks rounding of a normalised 25-bit mantissa to the packed 23-bit
// fraction in both modes: round-to-zero drops the guard bit, round-to-nearest adds it,
// a carry out of the mantissa increments the exponent, and the top exponent raises the
// exception.
module tb_fp_round_add;
  logic [33:0] in1;
  logic        round, exception_in, exception_out;
  logic [31:0] out1;
  int checks = 0, failures = 0;
  fp_round_add dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    exception_in = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [24:0] m;
      logic [7:0]  e;
      logic [24:0] up;
      m = 25'($urandom) | 25'h1000000;
      if (i % 10 == 0) m[24:1] = '1;            // forces the rounding carry
      e = 8'($urandom_range(1, 253));
      in1 = {1'($urandom), e, m};
      round = 1'($urandom);
      #1;
      up = {1'b0, m[24:1]} + 25'(round & m[0]);
      if (up[24]) check(out1 == {in1[33], e + 8'd1, 23'd0} && !exception_out, "rounding carry");
      else        check(out1 == {in1[33], e, up[22:0]} && !exception_out,
                        $sformatf("m=%h round=%0d got %h", m, round, out1));
    end
    in1 = {1'b0, 8'd254, 25'h1FFFFFF}; round = 1; #1;
    check(exception_out, "overflow into the top exponent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
