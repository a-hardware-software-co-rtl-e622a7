// fp_shift_adjust: second stage of the pipelined floating-point adder.
//
// Aligns the mantissa of the smaller operand to the larger one by shifting it right by the
// exponent difference. Both mantissas gain one guard bit on the right (always '0' for the
// larger operand), so the outputs are MW+1 bits wide. Bits shifted out beyond the guard bit
// are lost (no sticky bit), as in the document's description.
//
// Inputs: the ordered operands {sign, exponent, mantissa[MW]} from fp_swap.
// Outputs: both signs, the common (larger) exponent and the two aligned mantissas.
// Timing: one register stage, done = ready delayed by one clock.
module fp_shift_adjust #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ready,
  input  logic                 exception_in,
  input  logic [EXP_BITS+MW:0] op_large,
  input  logic [EXP_BITS+MW:0] op_small,
  output logic                 sign_l,
  output logic                 sign_s,
  output logic [EXP_BITS-1:0]  exp_out,
  output logic [MW:0]          large_m,
  output logic [MW:0]          small_m,
  output logic                 done,
  output logic                 exception_out
);
  logic [EXP_BITS-1:0] diff;
  logic [MW:0]         small_aligned;

  always_comb begin
    diff          = op_large[EXP_BITS+MW-1:MW] - op_small[EXP_BITS+MW-1:MW];
    small_aligned = {op_small[MW-1:0], 1'b0} >> diff;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_l <= 1'b0; sign_s <= 1'b0; exp_out <= '0; large_m <= '0; small_m <= '0;
      done <= 1'b0; exception_out <= 1'b0;
    end else begin
      done          <= ready;
      exception_out <= exception_in;
      if (ready) begin
        sign_l  <= op_large[EXP_BITS+MW];
        sign_s  <= op_small[EXP_BITS+MW];
        exp_out <= op_large[EXP_BITS+MW-1:MW];
        large_m <= {op_large[MW-1:0], 1'b0};
        small_m <= small_aligned;
      end
    end
  end
endmodule
