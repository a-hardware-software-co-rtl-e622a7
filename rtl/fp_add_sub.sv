// fp_add_sub: third stage of the pipelined floating-point adder.
//
// Adds the aligned mantissas when the operand signs agree (constructive addition) and
// subtracts the smaller from the larger when they differ (destructive addition). The
// operation select 'op' is the XOR of the two signs. The result is one bit wider than the
// aligned mantissas to hold the carry of a constructive addition. The result takes the sign
// and exponent of the larger operand.
//
// Timing: one register stage, done = ready delayed by one clock.
module fp_add_sub #(
  parameter int EXP_BITS = 8,
  parameter int MW       = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ready,
  input  logic                exception_in,
  input  logic                sign_l,
  input  logic                sign_s,
  input  logic [EXP_BITS-1:0] exp_in,
  input  logic [MW:0]         large_m,
  input  logic [MW:0]         small_m,
  output logic                sign_out,
  output logic [EXP_BITS-1:0] exp_out,
  output logic [MW+1:0]       sum,
  output logic                done,
  output logic                exception_out
);
  logic op;

  always_comb op = sign_l ^ sign_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_out <= 1'b0; exp_out <= '0; sum <= '0; done <= 1'b0; exception_out <= 1'b0;
    end else begin
      done          <= ready;
      exception_out <= exception_in;
      if (ready) begin
        sign_out <= sign_l;
        exp_out  <= exp_in;
        sum      <= op ? ({1'b0, large_m} - {1'b0, small_m})
                       : ({1'b0, large_m} + {1'b0, small_m});
      end
    end
  end
endmodule
