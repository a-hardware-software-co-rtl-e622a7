// tb_fx_add_cla: checks the carry-lookahead fixed-point adder.
//
// First the worked example for a 1-2-2 layout (INT_LENS 3, FRAC_LENS 2): 10111 + 11001 gives
// 110000 (-2.25 + -1.75 = -4). Then the default 1-3-16 instance against integer addition of
// sign-extended operands, for random operands with and without carry in.
module tb_fx_add_cla;
  logic [4:0]  s_op1, s_op2;
  logic [5:0]  s_sum;
  logic [19:0] op1, op2;
  logic        cin, s_cin;
  logic [20:0] sum;
  int checks = 0, failures = 0;

  fx_add_cla #(.INT_LENS(3), .FRAC_LENS(2)) u_small (.op1(s_op1), .op2(s_op2), .cin(s_cin), .sum(s_sum));
  fx_add_cla u_dut (.op1, .op2, .cin, .sum);

  initial begin
    s_op1 = 5'b10111; s_op2 = 5'b11001; s_cin = 1'b0;
    op1 = '0; op2 = '0; cin = 1'b0;
    #1;
    checks++;
    if (s_sum !== 6'b110000) begin failures++; $display("FAIL: example gives %b", s_sum); end
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      s_op1 = 5'(i); s_op2 = 5'(j); s_cin = 1'($urandom_range(1));
      #1;
      checks++;
      if ($signed(s_sum) !== 6'($signed(s_op1) + $signed(s_op2) + $signed({1'b0, s_cin}))) begin
        failures++; $display("FAIL: %b + %b + %b = %b", s_op1, s_op2, s_cin, s_sum);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      op1 = 20'($urandom); op2 = 20'($urandom); cin = 1'($urandom_range(1));
      #1;
      checks++;
      if ($signed(sum) !== 21'($signed(op1) + $signed(op2) + $signed({1'b0, cin}))) begin
        failures++; $display("FAIL: %h + %h + %b = %h", op1, op2, cin, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
