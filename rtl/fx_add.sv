// fx_add: parameterised fixed-point adder, ripple-carry form.
//
// Operands are two's-complement fixed-point numbers of INT_LENS integer bits (sign included)
// and FRAC_LENS fraction bits. Since both share the radix position, the adder only sees
// INT_LENS+FRAC_LENS-bit words. The operands are sign-extended by one bit and added by a chain
// of full adders. SUM is one bit wider than the operands, so it can never overflow. CIN feeds
// the first full adder (used with an inverted operand to subtract).
//
// Example with INT_LENS = 3, FRAC_LENS = 2: 10111 (-2.25) + 11001 (-1.75) = 110000 (-4.00).
// Timing: combinational.
module fx_add #(
  parameter int INT_LENS  = 4,
  parameter int FRAC_LENS = 16
) (
  input  logic [INT_LENS+FRAC_LENS-1:0] op1,
  input  logic [INT_LENS+FRAC_LENS-1:0] op2,
  input  logic                          cin,
  output logic [INT_LENS+FRAC_LENS:0]   sum
);
  localparam int W = INT_LENS + FRAC_LENS;

  logic [W:0] a, b;
  logic [W:0] c;

  always_comb begin
    a = {op1[W-1], op1};
    b = {op2[W-1], op2};
  end
  assign c[0] = cin;

  for (genvar i = 0; i <= W; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    if (i < W) begin : g_c
      assign c[i + 1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
  end
endmodule
