// xor_feedforward: feedforward calculation of the 2-2-1 XOR network.
//
// Hidden neurons 1 and 2 each take both inputs (weights v11/v21 and v12/v22, thresholds
// th_h1/th_h2); the output neuron takes the two hidden activations (weights w11/w21,
// threshold th_o). All three are xor_neuron instances.
// Interface: a valid_in pulse with in1, in2 and the weights held stable; b1, b2 (hidden
// activations) and c (network output) with valid_out. The number format is a parameter
// (INT_LENS with sign, FRAC_LENS); wt packs the nine parameters in xor_weights_t order
// (v11 in the top W bits ... th_o in the bottom W bits).
// Timing: valid_out follows valid_in by six clocks (two neuron layers of three).
module xor_feedforward
  import xor_pkg::*;
#(
  parameter int INT_LENS  = FX_INT,
  parameter int FRAC_LENS = FX_FRAC,
  localparam int W = INT_LENS + FRAC_LENS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_in,
  input  logic signed [W-1:0] in1,
  input  logic signed [W-1:0] in2,
  input  logic [9*W-1:0]      wt,
  output logic signed [W-1:0] b1,
  output logic signed [W-1:0] b2,
  output logic signed [W-1:0] c,
  output logic                valid_out
);
  typedef logic signed [W-1:0] fxw_t;
  typedef struct packed {
    fxw_t v11, v21, v12, v22;
    fxw_t w11, w21;
    fxw_t th_h1, th_h2, th_o;
  } wts_t;

  wts_t ws;
  logic vh1, vh2, vo;

  assign ws = wts_t'(wt);

  xor_neuron #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_h1 (
    .clk, .rst_n, .valid_in, .x1(in1), .x2(in2), .w1(ws.v11), .w2(ws.v21),
    .theta(ws.th_h1), .y(b1), .valid_out(vh1));
  xor_neuron #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_h2 (
    .clk, .rst_n, .valid_in, .x1(in1), .x2(in2), .w1(ws.v12), .w2(ws.v22),
    .theta(ws.th_h2), .y(b2), .valid_out(vh2));
  xor_neuron #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_o (
    .clk, .rst_n, .valid_in(vh1 & vh2), .x1(b1), .x2(b2), .w1(ws.w11), .w2(ws.w21),
    .theta(ws.th_o), .y(c), .valid_out(vo));

  assign valid_out = vo;
endmodule
