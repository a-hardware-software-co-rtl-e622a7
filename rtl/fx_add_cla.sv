// fx_add_cla: parameterised fixed-point adder, carry-lookahead form.
//
// Same function and ports as fx_add (sign-extended two's-complement sum, one bit wider than
// the operands), but the carries are computed from generate (g = a & b) and propagate
// (p = a ^ b) signals in 4-bit lookahead groups: inside a group every carry is a flat
// sum-of-products of the group's g, p and the group carry-in; the groups are chained.
// Timing: combinational.
module fx_add_cla #(
  parameter int INT_LENS  = 4,
  parameter int FRAC_LENS = 16
) (
  input  logic [INT_LENS+FRAC_LENS-1:0] op1,
  input  logic [INT_LENS+FRAC_LENS-1:0] op2,
  input  logic                          cin,
  output logic [INT_LENS+FRAC_LENS:0]   sum
);
  localparam int N  = INT_LENS + FRAC_LENS + 1;   // bits added, after sign extension
  localparam int NG = (N + 3) / 4;                // lookahead groups

  logic [4*NG-1:0] a, b, g, p;
  logic [4*NG:0]   c;

  always_comb begin
    a = (4*NG)'($signed({op1[N-2], op1}));
    b = (4*NG)'($signed({op2[N-2], op2}));
    g = a & b;
    p = a ^ b;
    c = '0;
    c[0] = cin;
    for (int grp = 0; grp < NG; grp++) begin
      for (int k = 1; k <= 4; k++) begin
        // c[base+k] = g[base+k-1] | p[base+k-1]g[base+k-2] | ... | p[base+k-1..base]c[base]
        logic term, acc;
        acc = 1'b0;
        for (int j = 0; j <= k; j++) begin
          // term j: product of p[base+k-1 .. base+j] and (j == 0 ? c[base] : g[base+j-1])
          term = (j == 0) ? c[4*grp] : g[4*grp + j - 1];
          for (int q = j; q < k; q++) term = term & p[4*grp + q];
          acc = acc | term;
        end
        c[4*grp + k] = acc;
      end
    end
    sum = (p[N-1:0] ^ c[N-1:0]);
  end
endmodule
