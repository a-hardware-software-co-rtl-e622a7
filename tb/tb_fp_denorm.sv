// tb_fp_denorm: checks that the implied integer bit is '1' for non-zero exponents and '0'
// for a zero exponent, with sign, exponent and fraction passed on unchanged.
module tb_fp_denorm;
  logic [31:0] in1;
  logic [32:0] out1;
  int checks = 0, failures = 0;
  fp_denorm dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      in1 = $urandom;
      if (i % 7 == 0) in1[30:23] = 8'd0;
      #1;
      checks++;
      if (out1 !== {in1[31:23], (in1[30:23] != 0), in1[22:0]}) begin
        failures++; $display("FAIL: %h -> %h", in1, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
