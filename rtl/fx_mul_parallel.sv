// fx_mul_parallel: unsigned parallel multiplier.
//
// Each bit of B selects, through a multiplexer, either A shifted to that bit's position or
// zero; all these partial products are added at once. The product is 2*WIDTH bits wide.
// Timing: combinational (fx_mul places pipeline registers around it).
module fx_mul_parallel #(
  parameter int WIDTH = 20
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] product
);
  logic [2*WIDTH-1:0] pp [WIDTH];

  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      pp[i] = b[i] ? ((2*WIDTH)'(a) << i) : '0;
    product = '0;
    for (int i = 0; i < WIDTH; i++) product = product + pp[i];
  end
endmodule
