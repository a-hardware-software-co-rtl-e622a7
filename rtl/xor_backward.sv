// xor_backward: backward calculation (error terms) of the XOR network.
//
//   d  = c (1 - c) (t - c)            output error, logistic derivative c(1-c)
//   e1 = b1 (1 - b1) w11 d            hidden errors
//   e2 = b2 (1 - b2) w21 d
// The operands are latched on valid_in. The differences 1-x and t-c are formed by fixed-point
// adders (inverted operand, carry-in 1) and saturated. Four levels of pipelined fixed-point
// multipliers follow: {c(1-c), b1(1-b1), b2(1-b2)}, then d, then {w11 d, w21 d}, then
// {e1, e2}. The multipliers run in parallel within a level.
// The number format is a parameter (INT_LENS with sign, FRAC_LENS); defaults from xor_pkg.
// Timing: valid_out follows valid_in by nine clocks.
module xor_backward
  import xor_pkg::*;
#(
  parameter int INT_LENS  = FX_INT,
  parameter int FRAC_LENS = FX_FRAC,
  localparam int W = INT_LENS + FRAC_LENS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_in,
  input  logic signed [W-1:0] b1,
  input  logic signed [W-1:0] b2,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] target,
  input  logic signed [W-1:0] w11,
  input  logic signed [W-1:0] w21,
  output logic signed [W-1:0] d,
  output logic signed [W-1:0] e1,
  output logic signed [W-1:0] e2,
  output logic                valid_out
);
  typedef logic signed [W-1:0] fxw_t;
  localparam fxw_t ONE = fxw_t'(1) <<< FRAC_LENS;

  // saturate a one-bit-wider sum back to the format
  function automatic fxw_t sat(input logic signed [W:0] v);
    if (v[W] != v[W-1]) return v[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                return v[W-1:0];
  endfunction

  fxw_t b1_q, b2_q, c_q, t_q, w11_q, w21_q;
  fxw_t omc, omb1, omb2, tmc;
  logic signed [W:0] s_omc, s_omb1, s_omb2, s_tmc;
  fxw_t g_o, g1, g2, wd1, wd2;
  logic v0, v1, v1b, v1c, v2, v3, v3b, v4, v4b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b1_q <= '0; b2_q <= '0; c_q <= '0; t_q <= '0; w11_q <= '0; w21_q <= '0; v0 <= 1'b0;
    end else begin
      v0 <= valid_in;
      if (valid_in) begin
        b1_q <= b1; b2_q <= b2; c_q <= c; t_q <= target; w11_q <= w11; w21_q <= w21;
      end
    end
  end

  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_omc  (.op1(ONE),    .op2(~c_q),  .cin(1'b1), .sum(s_omc));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_omb1 (.op1(ONE),    .op2(~b1_q), .cin(1'b1), .sum(s_omb1));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_omb2 (.op1(ONE),    .op2(~b2_q), .cin(1'b1), .sum(s_omb2));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_tmc  (.op1(t_q),    .op2(~c_q),  .cin(1'b1), .sum(s_tmc));
  always_comb begin
    omc = sat(s_omc); omb1 = sat(s_omb1); omb2 = sat(s_omb2); tmc = sat(s_tmc);
  end

  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_go (.clk, .rst_n, .valid_in(v0), .a(c_q),  .b(omc),  .p(g_o), .valid_out(v1));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_g1 (.clk, .rst_n, .valid_in(v0), .a(b1_q), .b(omb1), .p(g1),  .valid_out(v1b));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_g2 (.clk, .rst_n, .valid_in(v0), .a(b2_q), .b(omb2), .p(g2),  .valid_out(v1c));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_d  (.clk, .rst_n, .valid_in(v1 & v1b & v1c), .a(g_o), .b(tmc), .p(d), .valid_out(v2));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_w1 (.clk, .rst_n, .valid_in(v2), .a(w11_q), .b(d), .p(wd1), .valid_out(v3));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_w2 (.clk, .rst_n, .valid_in(v2), .a(w21_q), .b(d), .p(wd2), .valid_out(v3b));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_e1 (.clk, .rst_n, .valid_in(v3 & v3b), .a(g1), .b(wd1), .p(e1), .valid_out(v4));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_e2 (.clk, .rst_n, .valid_in(v3 & v3b), .a(g2), .b(wd2), .p(e2), .valid_out(v4b));

  assign valid_out = v4 & v4b;
endmodule
