// tb_fx_mul_parallel: checks the combinational unsigned parallel multiplier against integer
// multiplication, at 5 bits exhaustively (including 01111 * 00101 = 0001001011) and at the
// default 20 bits for random and corner operands.
module tb_fx_mul_parallel;
  logic [4:0]  s_a, s_b;
  logic [9:0]  s_p;
  logic [19:0] a, b;
  logic [39:0] product;
  int checks = 0, failures = 0;

  fx_mul_parallel #(.WIDTH(5)) u_small (.a(s_a), .b(s_b), .product(s_p));
  fx_mul_parallel u_dut (.a, .b, .product);

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      s_a = 5'(i); s_b = 5'(j);
      #1;
      checks++;
      if (s_p !== 10'(i * j)) begin failures++; $display("FAIL: %0d * %0d = %0d", i, j, s_p); end
    end
    s_a = 5'b01111; s_b = 5'b00101; #1;
    checks++;
    if (s_p !== 10'b0001001011) begin failures++; $display("FAIL: example %b", s_p); end
    for (int i = 0; i < 3000; i++) begin
      a = 20'($urandom); b = 20'($urandom);
      if (i % 50 == 0) a = '1;
      if (i % 50 == 1) begin a = '1; b = '1; end
      #1;
      checks++;
      if (product !== 40'(a) * 40'(b)) begin failures++; $display("FAIL: %h * %h = %h", a, b, product); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
