// fp_mul: pipelined floating-point multiplier on denormalised operands.
//
// The three fields are processed in parallel: the sign is the XOR of the input signs, the
// biased exponents are added and one bias is subtracted, and the two MW-bit mantissas (with
// explicit integer bit) are multiplied to a 2*MW-bit product. The product of two numbers in
// [1,2) lies in [1,4), i.e. it has two integer bits; this design adds 1 to the exponent so
// that the product's MSB can be read as the integer bit by the normaliser downstream.
//
// Operands: {sign, exponent[EXP_BITS], mantissa[MW]}. Result: {sign, exponent,
// mantissa[2*MW]} (1 + EXP_BITS + 2*MW bits, as in the document). A zero operand gives a
// zero result; an exponent below 1 flushes to zero; an exponent at or above the all-ones code,
// or an exception on the input, raises exception_out and gives zero.
// Timing: one register stage, done = ready delayed by one clock.
module fp_mul #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ready,
  input  logic                     exception_in,
  input  logic [EXP_BITS+MW:0]     op1,
  input  logic [EXP_BITS+MW:0]     op2,
  output logic [EXP_BITS+2*MW:0]   out1,
  output logic                     done,
  output logic                     exception_out
);
  localparam int BIAS = (1 << (EXP_BITS - 1)) - 1;
  localparam int EMAX = (1 << EXP_BITS) - 1;

  logic                  sign;
  logic signed [EXP_BITS+1:0] exp_sum;
  logic [2*MW-1:0]       prod;
  logic                  zero, exc;
  logic [EXP_BITS+2*MW:0] result;

  always_comb begin
    sign    = op1[EXP_BITS+MW] ^ op2[EXP_BITS+MW];
    exp_sum = $signed({2'b00, op1[EXP_BITS+MW-1:MW]}) + $signed({2'b00, op2[EXP_BITS+MW-1:MW]})
              - (EXP_BITS+2)'(BIAS) + (EXP_BITS+2)'(1);
    prod    = op1[MW-1:0] * op2[MW-1:0];
    zero    = (op1[MW-1] == 1'b0) || (op2[MW-1] == 1'b0);
    exc     = exception_in;
    result  = '0;
    if (!exc && !zero) begin
      if (exp_sum >= (EXP_BITS+2)'(EMAX)) exc = 1'b1;
      else if (exp_sum >= (EXP_BITS+2)'(1))
        result = {sign, exp_sum[EXP_BITS-1:0], prod};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out1 <= '0; done <= 1'b0; exception_out <= 1'b0;
    end else begin
      done <= ready;
      if (ready) begin
        out1          <= result;
        exception_out <= exc;
      end
    end
  end
endmodule
