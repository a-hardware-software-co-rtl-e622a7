// fx_mul_serial: unsigned serial (shift-and-add) multiplier.
//
// On 'start' A is zero-extended to 2*WIDTH bits as the first partial result and the
// accumulator is cleared. In each of the following WIDTH clocks, the partial result is added
// to the accumulator if the current bit of B (LSB first) is '1', and is then shifted left by
// one bit. After WIDTH clocks 'done' pulses and 'product' holds A*B. The current partial
// result is visible on 'partial'.
// Example (WIDTH = 5): A = 01111, B = 00101 gives partial results 0000001111, 0000011110,
// 0000111100, 0001111000, 0011110000 and the product 0001001011.
// Timing: done WIDTH clocks after start; 'busy' while working.
module fx_mul_serial #(
  parameter int WIDTH = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] product,
  output logic [2*WIDTH-1:0] partial,
  output logic               busy,
  output logic               done
);
  localparam int CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] b_q;
  logic [CW-1:0]    step;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      product <= '0; partial <= '0; b_q <= '0; step <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        partial <= (2*WIDTH)'(a);
        product <= '0;
        b_q     <= b;
        step    <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (b_q[step]) product <= product + partial;
        partial <= partial << 1;
        step    <= step + 1'b1;
        if (step == CW'(WIDTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
