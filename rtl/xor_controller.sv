// xor_controller: sequences the three computation modules of the XOR network.
//
// A 'start' in IDLE begins one pattern. FEED pulses ff_start and waits for ff_done. In
// recall mode (train = 0) the pattern then ends. In training mode (train = 1) BACK pulses
// bw_start and waits for bw_done, UPDATE pulses upd_start and waits for upd_done, and COMMIT
// writes the new weights (wr_en) before the pattern ends. 'done' pulses for one clock at the
// end of every pattern; 'busy' is high outside IDLE.
// Timing: one clock per state change; the modules' own latencies set the pattern time.
// The split into feedforward / backward / updating under one controller follows the source;
// the states are this design's choice.
module xor_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic train,
  input  logic ff_done,
  input  logic bw_done,
  input  logic upd_done,
  output logic ff_start,
  output logic bw_start,
  output logic upd_start,
  output logic wr_en,
  output logic done,
  output logic busy
);
  typedef enum logic [2:0] {IDLE, FEED, BACK, UPDATE, COMMIT} state_e;
  state_e state, next;
  logic   train_q;

  always_comb begin
    next = state;
    unique case (state)
      IDLE:    if (start)    next = FEED;
      FEED:    if (ff_done)  next = train_q ? BACK : IDLE;
      BACK:    if (bw_done)  next = UPDATE;
      UPDATE:  if (upd_done) next = COMMIT;
      COMMIT:                next = IDLE;
      default:               next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE; train_q <= 1'b0;
      ff_start <= 1'b0; bw_start <= 1'b0; upd_start <= 1'b0; done <= 1'b0;
    end else begin
      state     <= next;
      if (state == IDLE && start) train_q <= train;
      ff_start  <= (state == IDLE) && start;
      bw_start  <= (state == FEED) && ff_done && train_q;
      upd_start <= (state == BACK) && bw_done;
      done      <= ((state == FEED) && ff_done && !train_q) || (state == COMMIT);
    end
  end

  always_comb begin
    wr_en = (state == COMMIT);
    busy  = (state != IDLE);
  end
endmodule
