// fp_round_add: rounds a normalised mantissa back to the width of the packed format.
//
// Keeps the top MAN_BITS+1 bits of the MW_IN-bit mantissa. In round-to-nearest mode
// (round = 1) the next lower bit is added to the kept bits; in round-to-zero mode (round = 0)
// the lower bits are simply dropped. Ties round upward in magnitude, and bits below the
// rounding bit are not consulted. If rounding carries out of the mantissa, the mantissa becomes
// 1.000...0 and the exponent is incremented; reaching the all-ones exponent raises the
// exception. The implied integer bit is dropped in the output.
//
// Interface: in1 = {sign, exponent, mantissa[MW_IN]}; out1 = {sign, exponent,
// fraction[MAN_BITS]}. Timing: combinational; fp_rnd_norm registers the output.
module fp_round_add #(
  parameter int EXP_BITS = 8,
  parameter int MAN_BITS = 23,
  parameter int MW_IN    = 25
) (
  input  logic [EXP_BITS+MW_IN:0]    in1,
  input  logic                       round,
  input  logic                       exception_in,
  output logic [EXP_BITS+MAN_BITS:0] out1,
  output logic                       exception_out
);
  localparam logic [EXP_BITS-1:0] EXP_MAX = '1;

  logic                sign;
  logic [EXP_BITS-1:0] exp_in, exp_r;
  logic [MW_IN-1:0]    man;
  logic [MAN_BITS+1:0] kept;   // one extra bit for the rounding carry
  logic                rbit;

  always_comb begin
    {sign, exp_in, man} = in1;
    rbit          = man[MW_IN-MAN_BITS-2];
    kept          = {1'b0, man[MW_IN-1 -: MAN_BITS+1]} + (MAN_BITS+2)'(round & rbit);
    exp_r         = exp_in;
    exception_out = exception_in;
    out1          = '0;
    if (!exception_in && man[MW_IN-1]) begin
      if (kept[MAN_BITS+1]) begin
        exp_r = exp_in + 1'b1;
        kept  = kept >> 1;
      end
      if (exp_r == EXP_MAX) exception_out = 1'b1;
      else                  out1 = {sign, exp_r, kept[MAN_BITS-1:0]};
    end
  end
endmodule
