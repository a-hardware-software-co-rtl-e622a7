// fp_rnd_norm: converts an arithmetic result back to the packed IEEE format.
//
// Two pipeline stages separated by registers: fp_normalizer removes leading zeros from the
// mantissa (first register stage, which also holds the sign and the rounding mode), then
// fp_round_add rounds the mantissa to MAN_BITS+1 bits and drops the implied integer bit
// (second register stage). ROUND selects round-to-nearest (1) or round-to-zero (0).
//
// Interface: in1 = {sign, exponent, mantissa[MW_IN]} (MW_IN = 25 after the adder, 48 after
// the multiplier); out1 = packed {sign, exponent, fraction}. READY/DONE and the exception
// flags travel with the data. Timing: done follows ready by two clocks; one result per clock.
module fp_rnd_norm #(
  parameter int EXP_BITS = 8,
  parameter int MAN_BITS = 23,
  parameter int MW_IN    = 25
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ready,
  input  logic                       exception_in,
  input  logic                       round,
  input  logic [EXP_BITS+MW_IN:0]    in1,
  output logic [EXP_BITS+MAN_BITS:0] out1,
  output logic                       done,
  output logic                       exception_out
);
  logic [EXP_BITS+MW_IN:0]    norm, norm_q;
  logic                       ready_q, exc_q, round_q;
  logic [EXP_BITS+MAN_BITS:0] rounded;
  logic                       exc_r;

  fp_normalizer #(.EXP_BITS(EXP_BITS), .MW_IN(MW_IN)) u_norm (.in1, .out1(norm));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      norm_q <= '0; ready_q <= 1'b0; exc_q <= 1'b0; round_q <= 1'b0;
    end else begin
      ready_q <= ready;
      if (ready) begin
        norm_q  <= norm;
        exc_q   <= exception_in;
        round_q <= round;
      end
    end
  end

  fp_round_add #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS), .MW_IN(MW_IN)) u_round (
    .in1(norm_q), .round(round_q), .exception_in(exc_q), .out1(rounded), .exception_out(exc_r));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out1 <= '0; done <= 1'b0; exception_out <= 1'b0;
    end else begin
      done <= ready_q;
      if (ready_q) begin
        out1          <= rounded;
        exception_out <= exc_r;
      end
    end
  end
endmodule
