// tb_sigmoid3: checks the three-piece linear activation at its breakpoints (-2, 0, +2), in
// both saturated regions and over a sweep of the linear region, against
// y = 0 (x <= -2), 0.5 + x/4 rounded down (-2 < x < 2), 1 (x >= 2), in 1-3-16 fixed point.
module tb_sigmoid3;
  import tb_xor_pkg::*;
  logic [19:0] x, y;
  int checks = 0, failures = 0;

  sigmoid3 u_dut (.x, .y);

  task automatic check(input int xv, input int ev);
    x = 20'(xv); #1;
    checks++;
    if (s20(y) != ev) begin failures++; $display("FAIL: sig(%0d) = %0d, expected %0d", xv, s20(y), ev); end
  endtask

  initial begin
    check(0, ONE / 2);
    check(2 * ONE, ONE);
    check(-2 * ONE, 0);
    check(2 * ONE - 1, ONE - 1);
    check(-2 * ONE + 1, 0);
    check(ONE, 3 * ONE / 4);
    check(-ONE, ONE / 4);
    check(MAXV, ONE);
    check(MINV, 0);
    for (int i = 0; i < 4000; i++) begin
      int xv;
      xv = rnd_fx(19);
      check(xv, msig(xv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
