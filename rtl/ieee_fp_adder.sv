// ieee_fp_adder: IEEE-754 single-precision adder built from the parameterised library parts.
//
// Two fp_denorm instances make the implied integer bit of both operands explicit, fp_add
// performs the pipelined addition with one guard bit (25-bit mantissa) and fp_rnd_norm
// normalises and rounds the result back to the packed 32-bit format (round to nearest).
// An operand with the all-ones exponent (infinity or NaN) is flagged as an input exception;
// the result is then zero with 'exception' set.
//
// Interface: a, b, result are packed IEEE words. Timing: 'done' follows 'ready' by six clocks
// (four adder stages, two rounding stages); a new pair may enter every clock.
module ieee_fp_adder #(
  parameter int EXP_BITS = 8,
  parameter int MAN_BITS = 23
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ready,
  input  logic [EXP_BITS+MAN_BITS:0] a,
  input  logic [EXP_BITS+MAN_BITS:0] b,
  output logic [EXP_BITS+MAN_BITS:0] result,
  output logic                       done,
  output logic                       exception
);
  localparam int MW = MAN_BITS + 1;

  logic [EXP_BITS+MW:0]   da, db;
  logic [EXP_BITS+MW+1:0] sum;
  logic                   exc_in, sum_done, sum_exc;

  always_comb exc_in = (a[EXP_BITS+MAN_BITS-1:MAN_BITS] == '1) ||
                       (b[EXP_BITS+MAN_BITS-1:MAN_BITS] == '1);

  fp_denorm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_dna (.in1(a), .out1(da));
  fp_denorm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_dnb (.in1(b), .out1(db));

  fp_add #(.EXP_BITS(EXP_BITS), .MW(MW)) u_add (
    .clk, .rst_n, .ready, .exception_in(exc_in), .op1(da), .op2(db),
    .out1(sum), .done(sum_done), .exception_out(sum_exc));

  fp_rnd_norm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS), .MW_IN(MW + 1)) u_rn (
    .clk, .rst_n, .ready(sum_done), .exception_in(sum_exc), .round(1'b1), .in1(sum),
    .out1(result), .done, .exception_out(exception));
endmodule
