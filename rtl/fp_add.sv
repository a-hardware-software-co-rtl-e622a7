// fp_add: pipelined floating-point adder on denormalised operands.
//
// Four stages, one register each: fp_swap orders the operands by magnitude, fp_shift_adjust
// aligns the smaller mantissa and appends a guard bit, fp_add_sub adds or subtracts the
// mantissas according to the XOR of the signs, and fp_correction handles zero results,
// mantissa overflow and exceptions.
//
// Operands: {sign, exponent[EXP_BITS], mantissa[MW]} with an explicit integer bit (see
// fp_denorm). Result: {sign, exponent, mantissa[MW+1]}, unrounded and possibly with leading
// zeros; fp_rnd_norm turns it back into the packed format.
// Timing: 'done' follows 'ready' by four clocks; a new operand pair may enter every clock.
module fp_add #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ready,
  input  logic                   exception_in,
  input  logic [EXP_BITS+MW:0]   op1,
  input  logic [EXP_BITS+MW:0]   op2,
  output logic [EXP_BITS+MW+1:0] out1,
  output logic                   done,
  output logic                   exception_out
);
  logic [EXP_BITS+MW:0] op_large, op_small;
  logic                 d1, x1, d2, x2, d3, x3;
  logic                 sign_l, sign_s, sign_r;
  logic [EXP_BITS-1:0]  exp2, exp3;
  logic [MW:0]          large_m, small_m;
  logic [MW+1:0]        sum;

  fp_swap #(.EXP_BITS(EXP_BITS), .MW(MW)) u_swap (
    .clk, .rst_n, .ready, .exception_in, .a(op1), .b(op2),
    .op_large, .op_small, .done(d1), .exception_out(x1));

  fp_shift_adjust #(.EXP_BITS(EXP_BITS), .MW(MW)) u_shift (
    .clk, .rst_n, .ready(d1), .exception_in(x1), .op_large, .op_small,
    .sign_l, .sign_s, .exp_out(exp2), .large_m, .small_m, .done(d2), .exception_out(x2));

  fp_add_sub #(.EXP_BITS(EXP_BITS), .MW(MW)) u_addsub (
    .clk, .rst_n, .ready(d2), .exception_in(x2), .sign_l, .sign_s, .exp_in(exp2),
    .large_m, .small_m, .sign_out(sign_r), .exp_out(exp3), .sum, .done(d3), .exception_out(x3));

  fp_correction #(.EXP_BITS(EXP_BITS), .MW(MW)) u_corr (
    .clk, .rst_n, .ready(d3), .exception_in(x3), .sign_in(sign_r), .exp_in(exp3), .sum,
    .out1, .done, .exception_out);
endmodule
