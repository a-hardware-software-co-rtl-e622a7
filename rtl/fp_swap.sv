// fp_swap: first stage of the pipelined floating-point adder.
//
// Compares the exponent and mantissa of the two denormalised operands and routes the one of
// larger magnitude to 'op_large' and the other to 'op_small'. Operand A goes to 'op_large' when its
// exponent is larger, or the exponents are equal and its mantissa is larger; otherwise B does.
//
// Operand format: {sign, exponent[EXP_BITS], mantissa[MW]} with the integer bit as mantissa MSB.
// Timing: one register stage; 'done' is 'ready' delayed by one clock, the exception flag
// travels alongside. The comparison rule follows the document; the register stage is this
// design's choice.
module fp_swap #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ready,
  input  logic                   exception_in,
  input  logic [EXP_BITS+MW:0]   a,
  input  logic [EXP_BITS+MW:0]   b,
  output logic [EXP_BITS+MW:0]   op_large,
  output logic [EXP_BITS+MW:0]   op_small,
  output logic                   done,
  output logic                   exception_out
);
  logic a_larger;

  // magnitude = {exponent, mantissa}; the sign bit is the MSB and is left out
  always_comb a_larger = a[EXP_BITS+MW-1:0] > b[EXP_BITS+MW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_large <= '0; op_small <= '0; done <= 1'b0; exception_out <= 1'b0;
    end else begin
      done          <= ready;
      exception_out <= exception_in;
      if (ready) begin
        op_large <= a_larger ? a : b;
        op_small <= a_larger ? b : a;
      end
    end
  end
endmodule
