// xor_update: updating of all nine weights and thresholds of the XOR network in parallel.
//
//   w_ho += alpha * b_h * d      th_o  += alpha * d
//   v_ih += alpha * a_i * e_h    th_h  += alpha * e_h
// The operands are latched on valid_in. Level 1 multiplies the learning rate by the three
// error terms (alpha*d, alpha*e1, alpha*e2); level 2 multiplies these by the activations of
// the source nodes (six products); fixed-point adders then add every change to its old value,
// with saturation, and the nine new values are registered.
// The number format is a parameter (INT_LENS with sign, FRAC_LENS); old_wt and new_wt pack
// the nine parameters in xor_weights_t order (v11 in the top W bits ... th_o at the bottom).
// Timing: valid_out follows valid_in by six clocks; new_wt is held until the next update.
module xor_update
  import xor_pkg::*;
#(
  parameter int INT_LENS  = FX_INT,
  parameter int FRAC_LENS = FX_FRAC,
  localparam int W = INT_LENS + FRAC_LENS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_in,
  input  logic signed [W-1:0] alpha,
  input  logic signed [W-1:0] in1,
  input  logic signed [W-1:0] in2,
  input  logic signed [W-1:0] b1,
  input  logic signed [W-1:0] b2,
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] e1,
  input  logic signed [W-1:0] e2,
  input  logic [9*W-1:0]      old_wt,
  output logic [9*W-1:0]      new_wt,
  output logic                valid_out
);
  typedef logic signed [W-1:0] fxw_t;
  typedef struct packed {
    fxw_t v11, v21, v12, v22;
    fxw_t w11, w21;
    fxw_t th_h1, th_h2, th_o;
  } wts_t;

  // saturate a one-bit-wider sum back to the format
  function automatic fxw_t sat(input logic signed [W:0] v);
    if (v[W] != v[W-1]) return v[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                return v[W-1:0];
  endfunction

  fxw_t al_q, in1_q, in2_q, b1_q, b2_q, d_q, e1_q, e2_q;
  wts_t ow, nw;
  fxw_t ad, ae1, ae2;
  fxw_t dw11, dw21, dv11, dv21, dv12, dv22;
  logic v0, v1a, v1b, v1c;
  logic [5:0] v2;
  logic signed [W:0] s [9];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {al_q, in1_q, in2_q, b1_q, b2_q, d_q, e1_q, e2_q} <= '0; ow <= '0; v0 <= 1'b0;
    end else begin
      v0 <= valid_in;
      if (valid_in) begin
        al_q <= alpha; in1_q <= in1; in2_q <= in2; b1_q <= b1; b2_q <= b2;
        d_q <= d; e1_q <= e1; e2_q <= e2; ow <= wts_t'(old_wt);
      end
    end
  end

  // level 1: alpha * error
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_ad  (.clk, .rst_n, .valid_in(v0), .a(al_q), .b(d_q),  .p(ad),  .valid_out(v1a));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_ae1 (.clk, .rst_n, .valid_in(v0), .a(al_q), .b(e1_q), .p(ae1), .valid_out(v1b));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_ae2 (.clk, .rst_n, .valid_in(v0), .a(al_q), .b(e2_q), .p(ae2), .valid_out(v1c));

  // level 2: times the source activation
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_w11 (.clk, .rst_n, .valid_in(v1a), .a(ad),  .b(b1_q),  .p(dw11), .valid_out(v2[0]));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_w21 (.clk, .rst_n, .valid_in(v1a), .a(ad),  .b(b2_q),  .p(dw21), .valid_out(v2[1]));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_v11 (.clk, .rst_n, .valid_in(v1b), .a(ae1), .b(in1_q), .p(dv11), .valid_out(v2[2]));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_v21 (.clk, .rst_n, .valid_in(v1b), .a(ae1), .b(in2_q), .p(dv21), .valid_out(v2[3]));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_v12 (.clk, .rst_n, .valid_in(v1c), .a(ae2), .b(in1_q), .p(dv12), .valid_out(v2[4]));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_v22 (.clk, .rst_n, .valid_in(v1c), .a(ae2), .b(in2_q), .p(dv22), .valid_out(v2[5]));

  // accumulate
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s0 (.op1(ow.v11),   .op2(dv11), .cin(1'b0), .sum(s[0]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s1 (.op1(ow.v21),   .op2(dv21), .cin(1'b0), .sum(s[1]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s2 (.op1(ow.v12),   .op2(dv12), .cin(1'b0), .sum(s[2]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s3 (.op1(ow.v22),   .op2(dv22), .cin(1'b0), .sum(s[3]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s4 (.op1(ow.w11),   .op2(dw11), .cin(1'b0), .sum(s[4]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s5 (.op1(ow.w21),   .op2(dw21), .cin(1'b0), .sum(s[5]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s6 (.op1(ow.th_h1), .op2(ae1),  .cin(1'b0), .sum(s[6]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s7 (.op1(ow.th_h2), .op2(ae2),  .cin(1'b0), .sum(s[7]));
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_s8 (.op1(ow.th_o),  .op2(ad),   .cin(1'b0), .sum(s[8]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nw <= '0; valid_out <= 1'b0;
    end else begin
      valid_out <= &v2;
      if (&v2) begin
        nw.v11   <= sat(s[0]);
        nw.v21   <= sat(s[1]);
        nw.v12   <= sat(s[2]);
        nw.v22   <= sat(s[3]);
        nw.w11   <= sat(s[4]);
        nw.w21   <= sat(s[5]);
        nw.th_h1 <= sat(s[6]);
        nw.th_h2 <= sat(s[7]);
        nw.th_o  <= sat(s[8]);
      end
    end
  end

  assign new_wt = nw;
endmodule
