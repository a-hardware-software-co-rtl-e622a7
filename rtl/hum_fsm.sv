// hum_fsm: the HUM controller, three states waiting / calculating / sending.
//
// Inputs are Ready_cal (a full batch is stored), Ready_out (all update units are done) and
// Done_out (all results have been sent). The state code is {Start_cal, Start_out}:
//   waiting     (00): stays while Ready_cal = 0, goes to calculating when Ready_cal = 1;
//   calculating (10): stays while Ready_out = 0, goes to sending when Ready_out = 1;
//   sending     (01): stays while Done_out = 0, goes to waiting when Done_out = 1.
// The states, their codes and these transitions are those of the source's state diagram.
// Two one-clock strobes are added for the datapath: 'launch_cal' on the waiting->calculating
// step (starts the update units and frees the input registers) and 'launch_out' on the
// calculating->sending step (acknowledges the units' done flags).
// Timing: Moore outputs, one clock per transition.
module hum_fsm
  import hum_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ready_cal,
  input  logic       ready_out,
  input  logic       done_out,
  output logic       start_cal,
  output logic       start_out,
  output logic       launch_cal,
  output logic       launch_out,
  output hum_state_e state
);
  hum_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      WAITING:     if (ready_cal) next = CALCULATING;
      CALCULATING: if (ready_out) next = SENDING;
      SENDING:     if (done_out)  next = WAITING;
      default:     next = WAITING;
    endcase
  end

  always_comb begin
    {start_cal, start_out} = state;
    launch_cal = (state == WAITING)     && ready_cal;
    launch_out = (state == CALCULATING) && ready_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= WAITING;
    else        state <= next;
  end
endmodule
