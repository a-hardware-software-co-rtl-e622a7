// fx_mul: pipelined signed fixed-point multiplier.
//
// Operands are two's-complement numbers of INT_LENS integer bits (sign included) and
// FRAC_LENS fraction bits. Stage 1 registers the magnitudes of both operands and the product
// sign (XOR of the operand signs). Stage 2 multiplies the magnitudes in an unsigned parallel
// multiplier, drops the FRAC_LENS low bits of the product so the result has the operands'
// format, saturates the magnitude to the largest positive value, and takes the two's
// complement when the signs differed. The result is therefore truncated toward zero.
// Timing: valid_out follows valid_in by two clocks; one product per clock.
// Magnitude-then-sign follows the source; the truncation and saturation are this design's
// choices. The FRAC_LENS low product bits are discarded by that truncation, so lint reports
// them as unused.
module fx_mul #(
  parameter int INT_LENS  = 4,
  parameter int FRAC_LENS = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          valid_in,
  input  logic [INT_LENS+FRAC_LENS-1:0] a,
  input  logic [INT_LENS+FRAC_LENS-1:0] b,
  output logic [INT_LENS+FRAC_LENS-1:0] p,
  output logic                          valid_out
);
  localparam int W = INT_LENS + FRAC_LENS;
  localparam logic [W-1:0] MAXMAG = {1'b0, {(W-1){1'b1}}};

  logic [W-1:0]   ma, mb, ma_q, mb_q, mag;
  logic           neg_q, v_q;
  logic [2*W-1:0] prod;

  always_comb begin
    ma = a[W-1] ? (~a + 1'b1) : a;
    mb = b[W-1] ? (~b + 1'b1) : b;
  end

  fx_mul_parallel #(.WIDTH(W)) u_pmul (.a(ma_q), .b(mb_q), .product(prod));

  always_comb begin
    if (prod[2*W-1:FRAC_LENS] > (2*W-FRAC_LENS)'(MAXMAG)) mag = MAXMAG;
    else                                                  mag = prod[FRAC_LENS +: W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ma_q <= '0; mb_q <= '0; neg_q <= 1'b0; v_q <= 1'b0; p <= '0; valid_out <= 1'b0;
    end else begin
      v_q       <= valid_in;
      valid_out <= v_q;
      ma_q      <= ma;
      mb_q      <= mb;
      neg_q     <= a[W-1] ^ b[W-1];
      p         <= neg_q ? (~mag + 1'b1) : mag;
    end
  end
endmodule
