// xor_ann: pure-hardware multilayer perceptron with on-chip back-propagation for XOR.
//
// A 2-2-1 network in fixed point (1-3-16 by default) learns XOR by back-propagation, entirely in hardware.
// It holds its nine weights and thresholds in a register bank. xor_feedforward computes the
// hidden activations b1, b2 and the output c; xor_backward computes the error terms d, e1,
// e2 from the target; xor_update computes all nine new values in parallel; xor_controller
// sequences them. The new values are committed to the bank at the end of a training
// pattern.
//
// Interface: 'load' writes load_wt into the bank (initial weights). A 'start' pulse with
// in1, in2, target and 'train' held steady runs one pattern: recall (train = 0, feedforward
// only) or training (train = 1). 'alpha' is the learning rate. 'done' pulses when the pattern
// is finished; 'out' is the network output, 'wt' the current weights.
// The number format is a parameter: INT_LENS integer bits including the sign (4 gives
// 1-3-16, 5 gives 1-4-16, 6 gives 1-5-16) and FRAC_LENS fraction bits. load_wt and wt pack
// the nine parameters in xor_weights_t order (v11 in the top W bits ... th_o at the bottom),
// so at the default format they connect directly to an xor_weights_t.
// Timing: recall takes 8 clocks from start to done, training 26.
module xor_ann
  import xor_pkg::*;
#(
  parameter int INT_LENS  = FX_INT,
  parameter int FRAC_LENS = FX_FRAC,
  localparam int W = INT_LENS + FRAC_LENS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [9*W-1:0]      load_wt,
  input  logic                start,
  input  logic                train,
  input  logic signed [W-1:0] in1,
  input  logic signed [W-1:0] in2,
  input  logic signed [W-1:0] target,
  input  logic signed [W-1:0] alpha,
  output logic signed [W-1:0] out,
  output logic [9*W-1:0]      wt,
  output logic                busy,
  output logic                done
);
  logic signed [W-1:0] b1, b2, c, d, e1, e2;
  logic [9*W-1:0] new_wt;
  logic ff_start, ff_done, bw_start, bw_done, upd_start, upd_done, wr_en;

  always_ff @(posedge clk) begin
    if (!rst_n)     wt <= '0;
    else if (load)  wt <= load_wt;
    else if (wr_en) wt <= new_wt;
  end

  xor_controller u_ctrl (
    .clk, .rst_n, .start, .train, .ff_done, .bw_done, .upd_done,
    .ff_start, .bw_start, .upd_start, .wr_en, .done, .busy);

  xor_feedforward #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_ff (
    .clk, .rst_n, .valid_in(ff_start), .in1, .in2, .wt, .b1, .b2, .c, .valid_out(ff_done));

  xor_backward #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_bw (
    .clk, .rst_n, .valid_in(bw_start), .b1, .b2, .c, .target, .w11(wt[4*W +: W]), .w21(wt[3*W +: W]),
    .d, .e1, .e2, .valid_out(bw_done));

  xor_update #(.INT_LENS(INT_LENS), .FRAC_LENS(FRAC_LENS)) u_upd (
    .clk, .rst_n, .valid_in(upd_start), .alpha, .in1, .in2, .b1, .b2, .d, .e1, .e2,
    .old_wt(wt), .new_wt, .valid_out(upd_done));

  assign out = c;

  // a new pattern may only start when the network is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
