// update_unit: computes one back-propagation weight update, op1 + op2 * op3 * op4.
//
// For a weight, op1 = old weight, op2 = learning rate, op3 = activation of the source node,
// op4 = error of the destination node, giving w + alpha * b * d. A threshold is updated with
// op3 = 1.0. The unit holds two IEEE single-precision multipliers and one IEEE adder, used in
// sequence: m1 = op2 * op3, m2 = m1 * op4, result = op1 + m2.
//
// Interface: a one-clock 'start' latches the four operands and begins the work. When the sum
// is ready the unit stores it in 'result' and raises 'done', which stays high until 'ack'.
// 'exception' reports an exception from any of the three operators for the last update.
// Timing: result ready 13 clocks after start (1 operand latch + 3 + 3 + 6).
// The operator chain is this design's reading of "two multipliers and one adder"; the
// exact wiring of the unit is not given by the source.
module update_unit #(
  parameter int EXP_BITS = 8,
  parameter int MAN_BITS = 23
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       ack,
  input  logic [EXP_BITS+MAN_BITS:0] op1,
  input  logic [EXP_BITS+MAN_BITS:0] op2,
  input  logic [EXP_BITS+MAN_BITS:0] op3,
  input  logic [EXP_BITS+MAN_BITS:0] op4,
  output logic [EXP_BITS+MAN_BITS:0] result,
  output logic                       done,
  output logic                       exception
);
  localparam int W = EXP_BITS + MAN_BITS + 1;

  logic [W-1:0] r1, r2, r3, r4, m1, m2, sum;
  logic         go, m1_done, m2_done, sum_done;
  logic         m1_exc, m2_exc, sum_exc, exc_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0; go <= 1'b0;
    end else begin
      go <= start;
      if (start) begin
        r1 <= op1; r2 <= op2; r3 <= op3; r4 <= op4;
      end
    end
  end

  ieee_fp_multiplier #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_mul1 (
    .clk, .rst_n, .ready(go), .a(r2), .b(r3), .result(m1), .done(m1_done), .exception(m1_exc));

  ieee_fp_multiplier #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_mul2 (
    .clk, .rst_n, .ready(m1_done), .a(m1), .b(r4), .result(m2), .done(m2_done),
    .exception(m2_exc));

  ieee_fp_adder #(.EXP_BITS(EXP_BITS), .MAN_BITS(MAN_BITS)) u_add (
    .clk, .rst_n, .ready(m2_done), .a(r1), .b(m2), .result(sum), .done(sum_done),
    .exception(sum_exc));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result <= '0; done <= 1'b0; exception <= 1'b0; exc_acc <= 1'b0;
    end else begin
      if (start)        exc_acc <= 1'b0;
      else if (m1_done) exc_acc <= exc_acc | m1_exc;
      else if (m2_done) exc_acc <= exc_acc | m2_exc;
      if (sum_done) begin
        result    <= sum;
        done      <= 1'b1;
        exception <= exc_acc | sum_exc;
      end else if (ack) begin
        done <= 1'b0;
      end
    end
  end
endmodule
