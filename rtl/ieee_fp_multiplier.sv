// ieee_fp_multiplier: IEEE-754 single-precision multiplier built from the library parts.
//
// Two fp_denorm instances make the implied integer bit of both operands explicit, fp_mul
// multiplies them (48-bit mantissa product) and fp_rnd_norm normalises and rounds the product
// back to the packed 32-bit format (round to nearest). An operand with the all-ones exponent
// (infinity or NaN) raises 'exception' and gives a zero result.
//
// Interface: a, b, result are packed IEEE words. Timing: 'done' follows 'ready' by three
// clocks (one multiplier stage, two rounding stages); a new pair may enter every clock.
module ieee_fp_multiplier #(
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
  logic [EXP_BITS+2*MW:0] prod;
  logic                   exc_in, prod_done, prod_exc;

  always_comb exc_in = (a[EXP_BITS+MAN_BITS-1:MAN_BITS] == '1) ||
                       (b[EXP_BITS+MAN_BITS-1:MAN_BITS] == '1);

  fp_denorm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_dna (.in1(a), .out1(da));
  fp_denorm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_dnb (.in1(b), .out1(db));

  fp_mul #(.EXP_BITS(EXP_BITS), .MW(MW)) u_mul (
    .clk, .rst_n, .ready, .exception_in(exc_in), .op1(da), .op2(db),
    .out1(prod), .done(prod_done), .exception_out(prod_exc));

  fp_rnd_norm #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS), .MW_IN(2 * MW)) u_rn (
    .clk, .rst_n, .ready(prod_done), .exception_in(prod_exc), .round(1'b1), .in1(prod),
    .out1(result), .done, .exception_out(exception));
endmodule
