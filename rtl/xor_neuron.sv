// xor_neuron: one processing element of the XOR network (two inputs).
//
// Two pipelined fixed-point multipliers form x1*w1 and x2*w2, a fixed-point adder sums them,
// a second adder adds the threshold, the sum is saturated to the number format, and the
// three-piece linear sigmoid gives the activation, which is registered.
// Interface: valid_in with x1, x2, w1, w2, theta; y with valid_out. All values are
// INT_LENS (sign included) + FRAC_LENS bit fixed point; the defaults come from xor_pkg.
// Timing: valid_out follows valid_in by three clocks. Inputs must be held for the first two.
// The two multipliers, adder and sigmoid follow the source's neuron diagram; the threshold
// adder is this design's addition, required by the threshold-update equations the network
// implements.
module xor_neuron
  import xor_pkg::*;
#(
  parameter int INT_LENS  = FX_INT,
  parameter int FRAC_LENS = FX_FRAC,
  localparam int W = INT_LENS + FRAC_LENS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_in,
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  input  logic signed [W-1:0] w1,
  input  logic signed [W-1:0] w2,
  input  logic signed [W-1:0] theta,
  output logic signed [W-1:0] y,
  output logic                valid_out
);
  typedef logic signed [W-1:0] fxw_t;

  // saturate a one-bit-wider sum back to the format
  function automatic fxw_t sat(input logic signed [W:0] v);
    if (v[W] != v[W-1]) return v[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                return v[W-1:0];
  endfunction

  fxw_t p1, p2, s1_sat, net, act;
  logic v1, v2;
  logic signed [W:0] s1, s2;

  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_m1 (
    .clk, .rst_n, .valid_in, .a(x1), .b(w1), .p(p1), .valid_out(v1));
  fx_mul #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_m2 (
    .clk, .rst_n, .valid_in, .a(x2), .b(w2), .p(p2), .valid_out(v2));

  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_a1 (.op1(p1), .op2(p2), .cin(1'b0), .sum(s1));
  always_comb s1_sat = sat(s1);
  fx_add #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_a2 (.op1(s1_sat), .op2(theta), .cin(1'b0), .sum(s2));
  always_comb net = sat(s2);

  sigmoid3 #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_sig (.x(net), .y(act));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0; valid_out <= 1'b0;
    end else begin
      valid_out <= v1 & v2;
      if (v1 & v2) y <= act;
    end
  end
endmodule
