// tb_fx_formats: the fixed-point operators in all fifteen evaluated formats.
//
// The formats fix1..fix15 have 4, 5 or 6 integer bits (sign included) and 12 to 16 fraction
// bits (16 to 22 bits in all). For each, a ripple-carry adder, a carry-lookahead adder, a
// parallel and a serial unsigned multiplier and the signed pipelined multiplier are
// instantiated and checked against integer arithmetic on random operands. The signed
// multiplier's reference is the product of magnitudes shifted right by the fraction width,
// saturated to the largest magnitude, with the sign restored.
module tb_fx_formats;
  localparam int NF = 15;
  localparam int IL [NF] = '{4, 4, 4, 4, 4, 5, 5, 5, 5, 5, 6, 6, 6, 6, 6};
  localparam int FL [NF] = '{12, 13, 14, 15, 16, 12, 13, 14, 15, 16, 12, 13, 14, 15, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [63:0] ra, rb;
  logic        cin, start, valid;
  int checks = 0, failures = 0;
  int fails_per_format [NF];

  for (genvar f = 0; f < NF; f++) begin : g_fmt
    localparam int W = IL[f] + FL[f];
    logic [W-1:0]   a, b, p;
    logic [W:0]     s_rc, s_cla;
    logic [2*W-1:0] pp, ps, partial;
    logic           busy, done, vout;
    assign a = ra[W-1:0];
    assign b = rb[W-1:0];
    fx_add     #(.INT_LENS(IL[f]), .FRAC_LENS(FL[f])) u_rc  (.op1(a), .op2(b), .cin, .sum(s_rc));
    fx_add_cla #(.INT_LENS(IL[f]), .FRAC_LENS(FL[f])) u_cla (.op1(a), .op2(b), .cin, .sum(s_cla));
    fx_mul_parallel #(.WIDTH(W)) u_pm (.a, .b, .product(pp));
    fx_mul_serial   #(.WIDTH(W)) u_sm (.clk, .rst_n, .start, .a, .b, .product(ps), .partial, .busy, .done);
    fx_mul #(.INT_LENS(IL[f]), .FRAC_LENS(FL[f])) u_fm (.clk, .rst_n, .valid_in(valid), .a, .b, .p, .valid_out(vout));

    // reference results for the operands currently applied
    function automatic bit ok_add(input logic [W:0] s);
      return $signed(s) == (W+1)'($signed(a) + $signed(b) + $signed({1'b0, cin}));
    endfunction
    function automatic logic [W-1:0] ref_mul();
      longint ma, mb, m, maxm;
      ma = $signed(a); mb = $signed(b);
      ma = (ma < 0) ? -ma : ma; mb = (mb < 0) ? -mb : mb;
      m = (ma * mb) >>> FL[f];
      maxm = (longint'(1) << (W - 1)) - 1;
      if (m > maxm) m = maxm;
      if ((a[W-1] ^ b[W-1]) != 0) m = -m;
      return W'(m);
    endfunction
  end

  task automatic fail(input int f, input string what);
    failures++;
    fails_per_format[f]++;
    if (fails_per_format[f] <= 3) $display("FAIL: fix%0d %s", f + 1, what);
  endtask

  initial begin
    ra = '0; rb = '0; cin = 1'b0; start = 1'b0; valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic [63:0] exp_m [NF];
      ra = {$urandom, $urandom}; rb = {$urandom, $urandom}; cin = 1'($urandom_range(1));
      if (t % 4 == 0) begin ra = ra >> 8; rb = rb >> 8; end
      start = 1'b1; valid = 1'b1;
      #1;
      // combinational operators and the references of the sequential ones
      `define FMT_CHECK(F) \
        checks += 3; \
        if (!g_fmt[F].ok_add(g_fmt[F].s_rc))  fail(F, "ripple-carry sum"); \
        if (!g_fmt[F].ok_add(g_fmt[F].s_cla)) fail(F, "carry-lookahead sum"); \
        if (g_fmt[F].pp != (2*(IL[F]+FL[F]))'(g_fmt[F].a) * (2*(IL[F]+FL[F]))'(g_fmt[F].b)) fail(F, "parallel product"); \
        exp_m[F] = 64'(g_fmt[F].ref_mul());
      `FMT_CHECK(0)  `FMT_CHECK(1)  `FMT_CHECK(2)  `FMT_CHECK(3)  `FMT_CHECK(4)
      `FMT_CHECK(5)  `FMT_CHECK(6)  `FMT_CHECK(7)  `FMT_CHECK(8)  `FMT_CHECK(9)
      `FMT_CHECK(10) `FMT_CHECK(11) `FMT_CHECK(12) `FMT_CHECK(13) `FMT_CHECK(14)
      @(negedge clk);
      start = 1'b0; valid = 1'b0;
      @(negedge clk);
      `define FMT_MUL(F) \
        checks++; \
        if (!g_fmt[F].vout || 64'(g_fmt[F].p) != exp_m[F]) fail(F, "signed product");
      `FMT_MUL(0)  `FMT_MUL(1)  `FMT_MUL(2)  `FMT_MUL(3)  `FMT_MUL(4)
      `FMT_MUL(5)  `FMT_MUL(6)  `FMT_MUL(7)  `FMT_MUL(8)  `FMT_MUL(9)
      `FMT_MUL(10) `FMT_MUL(11) `FMT_MUL(12) `FMT_MUL(13) `FMT_MUL(14)
      // serial multipliers: the widest takes 22 clocks
      repeat (22) @(negedge clk);
      `define FMT_SER(F) \
        checks++; \
        if (g_fmt[F].busy || g_fmt[F].ps != (2*(IL[F]+FL[F]))'(g_fmt[F].a) * (2*(IL[F]+FL[F]))'(g_fmt[F].b)) fail(F, "serial product");
      `FMT_SER(0)  `FMT_SER(1)  `FMT_SER(2)  `FMT_SER(3)  `FMT_SER(4)
      `FMT_SER(5)  `FMT_SER(6)  `FMT_SER(7)  `FMT_SER(8)  `FMT_SER(9)
      `FMT_SER(10) `FMT_SER(11) `FMT_SER(12) `FMT_SER(13) `FMT_SER(14)
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
