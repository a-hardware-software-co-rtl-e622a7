// tb_fp_normalizer: checks the left shift to MSB '1' with exponent decrement, on both the
// 25-bit (adder) and 48-bit (multiplier) mantissa widths, and the flush to zero when the
// exponent would reach zero or the mantissa is zero.
module tb_fp_normalizer;
  logic [33:0] in25, out25;
  logic [56:0] in48, out48;
  int checks = 0, failures = 0;
  fp_normalizer #(.MW_IN(25)) dut25 (.in1(in25), .out1(out25));
  fp_normalizer #(.MW_IN(48)) dut48 (.in1(in48), .out1(out48));
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sh, e;
      logic [24:0] m25;
      logic [47:0] m48;
      sh = $urandom_range(0, 24);
      e  = $urandom_range(1, 254);
      m25 = 25'({$urandom, $urandom}) | 25'h1000000;  // MSB set, then shift right
      m25 = m25 >> sh;
      in25 = {1'($urandom), 8'(e), m25};
      #1;
      if (e > sh) check(out25 == {in25[33], 8'(e - sh), m25 << sh}, $sformatf("25-bit sh %0d", sh));
      else        check(out25 == 0, "25-bit flush to zero");
      sh = $urandom_range(0, 47);
      m48 = {16'($urandom), $urandom} | 48'h800000000000;
      m48 = m48 >> sh;
      in48 = {1'($urandom), 8'(e), m48};
      #1;
      if (e > sh) check(out48 == {in48[56], 8'(e - sh), m48 << sh}, $sformatf("48-bit sh %0d", sh));
      else        check(out48 == 0, "48-bit flush to zero");
    end
    in25 = {1'b0, 8'd100, 25'd0}; #1;
    check(out25 == 0, "zero mantissa");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
