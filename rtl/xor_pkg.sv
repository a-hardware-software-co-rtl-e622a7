// xor_pkg: number format and types of the pure-hardware XOR network.
//
// All values are two's-complement fixed point. The default format has a sign bit, 3 integer
// bits and 16 fraction bits (1-3-16, 20 bits, range [-8, 8)). The XOR modules take the
// format as parameters (INT_LENS, FRAC_LENS) whose defaults are FX_INT and FX_FRAC, so the
// other evaluated formats (1-4-16, 1-5-16) are built by overriding INT_LENS. fx_t and
// xor_weights_t are the default-format types used at the top level. The network's nine
// trainable parameters travel together as xor_weights_t:
//   v11, v21: input 1 / input 2 -> hidden 1;  v12, v22: input 1 / input 2 -> hidden 2;
//   w11, w21: hidden 1 / hidden 2 -> output;  th_h1, th_h2, th_o: thresholds.
package xor_pkg;
  localparam int FX_INT  = 4;                 // integer bits including the sign
  localparam int FX_FRAC = 16;
  localparam int FX_W    = FX_INT + FX_FRAC;

  typedef logic signed [FX_W-1:0] fx_t;

  typedef struct packed {
    fx_t v11, v21, v12, v22;
    fx_t w11, w21;
    fx_t th_h1, th_h2, th_o;
  } xor_weights_t;
endpackage
