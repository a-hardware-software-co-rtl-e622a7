// ann_codesign_top: the three hardware designs of the face-recognition ANN project, side by side.
//
// 1. hum: the Hardware Update Module. It is the hardware half of the hardware/software
//    co-design. An embedded processor runs the 400-8-4 face-recognition MLP in software and
//    offloads the weight update: it streams {old weight, learning rate, activation, error}
//    for four weights at a time over one FSL channel, and reads back four updated weights,
//    IEEE-754 single precision, over the other. The FSL ports are brought out, because the
//    processor and the FIFOs are not part of this RTL.
// 2. xor_ann: a 2-2-1 MLP that learns XOR by back-propagation entirely in hardware, in
//    1-3-16 fixed point. It is the study that led to the co-design.
// 3. The fixed-point operator library that the network study compared: a carry-lookahead
//    adder and a serial and a parallel unsigned multiplier are brought out on their own ports
//    (the ripple-carry adder and the signed pipelined multiplier are used inside xor_ann).
// The three share only the clock and reset. Interfaces and timing are those of each block.
module ann_codesign_top
  import hum_pkg::*;
  import xor_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // ---- HUM: FSL0 (processor -> HUM) ----
  input  word_t        FSL0_S_Data,
  input  logic         FSL0_S_Control,
  input  logic         FSL0_S_Exists,
  output logic         FSL0_S_Read,
  // ---- HUM: FSL1 (HUM -> processor) ----
  output word_t        FSL1_M_Data,
  output logic         FSL1_M_Control,
  output logic         FSL1_M_Write,
  input  logic         FSL1_M_Full,
  output hum_state_e   hum_state,
  output logic         hum_exception,
  // ---- XOR network ----
  input  logic         xor_load,
  input  xor_weights_t xor_load_wt,
  input  logic         xor_start,
  input  logic         xor_train,
  input  fx_t          xor_in1,
  input  fx_t          xor_in2,
  input  fx_t          xor_target,
  input  fx_t          xor_alpha,
  output fx_t          xor_out,
  output xor_weights_t xor_wt,
  output logic         xor_busy,
  output logic         xor_done,
  // ---- fixed-point operators ----
  input  fx_t          cla_op1,
  input  fx_t          cla_op2,
  input  logic         cla_cin,
  output logic [FX_W:0] cla_sum,
  input  logic [FX_W-1:0]   mul_a,
  input  logic [FX_W-1:0]   mul_b,
  output logic [2*FX_W-1:0] pmul_product,
  input  logic              smul_start,
  output logic [2*FX_W-1:0] smul_product,
  output logic [2*FX_W-1:0] smul_partial,
  output logic              smul_busy,
  output logic              smul_done
);
  hum u_hum (
    .clk, .rst_n,
    .FSL0_S_Data, .FSL0_S_Control, .FSL0_S_Exists, .FSL0_S_Read,
    .FSL1_M_Data, .FSL1_M_Control, .FSL1_M_Write, .FSL1_M_Full,
    .state(hum_state), .exception(hum_exception));

  xor_ann u_xor (
    .clk, .rst_n, .load(xor_load), .load_wt(xor_load_wt), .start(xor_start),
    .train(xor_train), .in1(xor_in1), .in2(xor_in2), .target(xor_target),
    .alpha(xor_alpha), .out(xor_out), .wt(xor_wt), .busy(xor_busy), .done(xor_done));

  fx_add_cla #(.INT_LENS(FX_INT), .FRAC_LENS(FX_FRAC)) u_cla (
    .op1(cla_op1), .op2(cla_op2), .cin(cla_cin), .sum(cla_sum));

  fx_mul_parallel #(.WIDTH(FX_W)) u_pmul (.a(mul_a), .b(mul_b), .product(pmul_product));

  fx_mul_serial #(.WIDTH(FX_W)) u_smul (
    .clk, .rst_n, .start(smul_start), .a(mul_a), .b(mul_b),
    .product(smul_product), .partial(smul_partial), .busy(smul_busy), .done(smul_done));
endmodule
