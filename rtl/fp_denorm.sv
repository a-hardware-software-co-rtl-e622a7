// fp_denorm: makes the hidden integer bit of a packed IEEE-754-style number explicit.
//
// A normalised number stores only the fraction of its mantissa; the leading '1' is implied.
// This block restores it: '1' for any number whose exponent field is non-zero, '0' when the
// exponent field is zero (the encoding of zero). The arithmetic units downstream then work on
// a mantissa of MAN_BITS+1 bits whose MSB is the integer bit.
//
// Interface: in1 = {sign, exponent[EXP_BITS], fraction[MAN_BITS]};
//            out1 = {sign, exponent[EXP_BITS], 1'bint, fraction[MAN_BITS]}.
// Timing: purely combinational.
// Follows the document: the implied-bit rule. Own choice: no register stage, and subnormal
// inputs (exponent 0, fraction non-zero) are not given gradual-underflow treatment.
module fp_denorm #(
  parameter int EXP_BITS = 8,
  parameter int MAN_BITS = 23
) (
  input  logic [EXP_BITS+MAN_BITS:0]   in1,
  output logic [EXP_BITS+MAN_BITS+1:0] out1
);
  logic                sign;
  logic [EXP_BITS-1:0] exp_f;
  logic [MAN_BITS-1:0] frac;

  always_comb begin
    {sign, exp_f, frac} = in1;
    out1 = {sign, exp_f, (exp_f != '0), frac};
  end
endmodule
