// tb_fx_mul_serial: checks the serial shift-and-add multiplier.
//
// A WIDTH = 5 instance repeats the worked example A = 01111, B = 00101: the partial result
// after the start clock and after each of the next four clocks must be 0000001111, 0000011110,
// 0000111100, 0001111000, 0011110000, and the product 0001001011 (15 * 5 = 75), with 'done'
// exactly 5 clocks after the start clock. The default 20-bit instance is then checked
// against integer multiplication for random operands, including its cycle count.
module tb_fx_mul_serial;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        s_start, start;
  logic [4:0]  s_a, s_b;
  logic [9:0]  s_product, s_partial;
  logic        s_busy, s_done;
  logic [19:0] a, b;
  logic [39:0] product, partial;
  logic        busy, done;
  int checks = 0, failures = 0;

  fx_mul_serial #(.WIDTH(5)) u_small (.clk, .rst_n, .start(s_start), .a(s_a), .b(s_b),
    .product(s_product), .partial(s_partial), .busy(s_busy), .done(s_done));
  fx_mul_serial u_dut (.clk, .rst_n, .start, .a, .b, .product, .partial, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [9:0] PARTIALS [5] = '{10'b0000001111, 10'b0000011110, 10'b0000111100,
                                         10'b0001111000, 10'b0011110000};

  initial begin
    int cyc;
    s_start = 1'b0; start = 1'b0; s_a = '0; s_b = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    s_a = 5'b01111; s_b = 5'b00101; s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    for (int k = 0; k < 5; k++) begin
      check(s_partial == PARTIALS[k], $sformatf("partial %0d = %b", k, s_partial));
      check(!s_done, "done too early");
      @(negedge clk);
    end
    check(s_done, "done after 5 clocks");
    check(s_product == 10'b0001001011, $sformatf("product %b", s_product));
    for (int i = 0; i < 300; i++) begin
      logic [19:0] ra, rb;
      ra = 20'($urandom); rb = 20'($urandom);
      if (i % 10 == 0) ra = '1;
      if (i % 10 == 1) rb = '0;
      a = ra; b = rb; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a = 20'($urandom); b = 20'($urandom);   // operands are only sampled at start
      cyc = 0;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == 20, $sformatf("latency %0d", cyc));
      check(product == 40'(ra) * 40'(rb), $sformatf("%h * %h = %h", ra, rb, product));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
