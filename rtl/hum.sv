// hum: Hardware Update Module, the weight-update coprocessor of the face-recognition MLP.
//
// A processor streams the back-propagation update work to this module over one FSL channel
// and reads the results back over another. Each batch is 16 IEEE single-precision words, four
// per weight: {old weight, learning rate, activation, error}. The module computes
//   new = old + rate * activation * error
// for four weights (or thresholds, with activation = 1.0) at once in four update_unit
// instances, then returns the four new values.
//
// Blocks: hum_counter1 (FSL0 slave, 16 local registers, Ready_cal), hum_fsm (waiting ->
// calculating -> sending), four update_unit, hum_counter2 (FSL1 master, Done_out).
// Ready_out is the AND of the four units' done flags. The next batch may be fetched while
// the current one is calculated or sent.
//
// Interface: FSL0 slave side (FSL0_S_Data/Control/Exists in, FSL0_S_Read out), FSL1 master
// side (FSL1_M_Data/Control/Write out, FSL1_M_Full in), both in the 'clk' domain. 'state' and
// 'exception' are status outputs. FSL1_M_Control is constant '0': the update protocol sends
// data words only.
// Timing: a batch takes 16 clocks to load, 1 to flag Ready_cal, about 15 to compute and 5 to
// send (4 words plus Done_out) when neither FIFO stalls.
// The block structure, the FSL ports and the handshake follow the source. The operator chain
// inside the units and the stall on FSL1_M_Full are this design's choices.
module hum
  import hum_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // FSL0: processor (master) -> HUM (slave)
  input  word_t      FSL0_S_Data,
  input  logic       FSL0_S_Control,
  input  logic       FSL0_S_Exists,
  output logic       FSL0_S_Read,
  // FSL1: HUM (master) -> processor (slave)
  output word_t      FSL1_M_Data,
  output logic       FSL1_M_Control,
  output logic       FSL1_M_Write,
  input  logic       FSL1_M_Full,
  // status
  output hum_state_e state,
  output logic       exception
);
  word_t params  [BATCH_WORDS];
  word_t results [N_UNITS];
  logic  ready_cal, ready_out, done_out;
  logic  start_cal, start_out, launch_cal, launch_out;
  logic [N_UNITS-1:0] unit_done, unit_exc;

  hum_counter1 u_counter1 (
    .clk, .rst_n, .fsl_s_data(FSL0_S_Data), .fsl_s_exists(FSL0_S_Exists),
    .fsl_s_read(FSL0_S_Read), .consume(launch_cal), .params, .ready_cal);

  hum_fsm u_fsm (
    .clk, .rst_n, .ready_cal, .ready_out, .done_out,
    .start_cal, .start_out, .launch_cal, .launch_out, .state);

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    update_unit u_update (
      .clk, .rst_n, .start(launch_cal), .ack(launch_out),
      .op1(params[PARAMS_PER_UNIT*u + 0]), .op2(params[PARAMS_PER_UNIT*u + 1]),
      .op3(params[PARAMS_PER_UNIT*u + 2]), .op4(params[PARAMS_PER_UNIT*u + 3]),
      .result(results[u]), .done(unit_done[u]), .exception(unit_exc[u]));
  end

  always_comb begin
    ready_out = &unit_done;
    exception = |unit_exc;
  end

  hum_counter2 u_counter2 (
    .clk, .rst_n, .start_out, .results, .fsl_m_full(FSL1_M_Full),
    .fsl_m_data(FSL1_M_Data), .fsl_m_write(FSL1_M_Write), .fsl_m_control(FSL1_M_Control),
    .done_out);

  // FSL rules: read only what exists, never write into a full FIFO, data words only.
  a_read_exists: assert property (@(posedge clk) disable iff (!rst_n) FSL0_S_Read |-> FSL0_S_Exists);
  a_write_full:  assert property (@(posedge clk) disable iff (!rst_n) FSL1_M_Write |-> !FSL1_M_Full);
  // FSL0_S_Control marks control words; the update protocol only sends data words
  a_no_control:  assert property (@(posedge clk) disable iff (!rst_n) FSL0_S_Read |-> !FSL0_S_Control);
  // Start_cal and Start_out are never high together
  a_onehot:      assert property (@(posedge clk) disable iff (!rst_n) !(start_cal && start_out));
endmodule
