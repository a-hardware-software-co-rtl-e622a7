// fp_normalizer: brings a floating-point result back to normalised form.
//
// Shifts the mantissa left until its MSB is '1', decrementing the exponent by one for every
// bit shifted. A zero mantissa, or a shift that would take the exponent to zero or below,
// gives an all-zero result (flush to zero: subnormal results are not produced).
//
// Interface: in1/out1 = {sign, exponent[EXP_BITS], mantissa[MW_IN]}, mantissa MSB = integer
// bit. Timing: combinational; fp_rnd_norm registers its output.
module fp_normalizer #(
  parameter int EXP_BITS = 8,
  parameter int MW_IN    = 25
) (
  input  logic [EXP_BITS+MW_IN:0] in1,
  output logic [EXP_BITS+MW_IN:0] out1
);
  localparam int CW = $clog2(MW_IN + 1);

  logic                sign;
  logic [EXP_BITS-1:0] exp_in;
  logic [MW_IN-1:0]    man;
  logic [CW-1:0]       lz;
  logic                found;

  always_comb begin
    {sign, exp_in, man} = in1;
    // count leading zeros
    lz    = '0;
    found = 1'b0;
    for (int i = MW_IN - 1; i >= 0; i--) begin
      if (!found) begin
        if (man[i]) found = 1'b1;
        else        lz    = lz + 1'b1;
      end
    end
    if (!found || ({{(32-EXP_BITS){1'b0}}, exp_in} <= {{(32-CW){1'b0}}, lz}))
      out1 = '0;
    else
      out1 = {sign, exp_in - EXP_BITS'(lz), man << lz};
  end
endmodule
