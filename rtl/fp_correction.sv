// fp_correction: last stage of the pipelined floating-point adder.
//
// Decides the adder output in priority order:
//   1. an exception on the input is passed on and the result is all zeros;
//   2. a zero mantissa sum (equal magnitudes, opposite signs: A + (-A)) gives zero;
//   3. a carry out of the mantissa sum shifts the mantissa right by one bit (dropping the LSB,
//      filling the MSB with '1') and increments the exponent; an exponent that reaches the
//      all-ones code raises the exception;
//   4. otherwise the sum is passed on unchanged.
// Output: {sign, exponent, mantissa[MW+1]}: the mantissa keeps the guard bit, so for IEEE
// single precision it is 25 bits wide. Leading zeros after a subtraction are removed later by
// the normaliser. Timing: one register stage, done = ready delayed by one clock.
// Rules 1-3 follow the document; the overflow exception of rule 3 is this design's choice.
module fp_correction #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ready,
  input  logic                   exception_in,
  input  logic                   sign_in,
  input  logic [EXP_BITS-1:0]    exp_in,
  input  logic [MW+1:0]          sum,
  output logic [EXP_BITS+MW+1:0] out1,
  output logic                   done,
  output logic                   exception_out
);
  localparam logic [EXP_BITS-1:0] EXP_MAX = '1;

  logic [EXP_BITS+MW+1:0] result;
  logic                   exc;

  always_comb begin
    result = '0;
    exc    = 1'b0;
    if (exception_in) begin
      exc = 1'b1;
    end else if (sum == '0) begin
      result = '0;
    end else if (sum[MW+1]) begin
      if (exp_in + 1'b1 == EXP_MAX) exc = 1'b1;
      else result = {sign_in, exp_in + 1'b1, 1'b1, sum[MW:1]};
    end else begin
      result = {sign_in, exp_in, sum[MW:0]};
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
