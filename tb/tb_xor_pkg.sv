// tb_xor_pkg: bit-exact integer reference model of the 1-3-16 fixed-point XOR network.
//
// Values are held as plain ints scaled by 2^16. The model follows the arithmetic rules of the
// hardware, written independently: products are truncated toward zero and saturated to the
// 20-bit range, sums are saturated, and the activation is the three-piece linear sigmoid
// 0 / 0.5 + x/4 (rounded toward minus infinity) / 1 with breakpoints at -2 and +2.
// The saturation range is that of 1-3-16 unless set_int_lens() selects another number of
// integer bits (the wider 1-4-16 and 1-5-16 formats).
package tb_xor_pkg;
  localparam int FRAC = 16;
  localparam int ONE  = 1 << FRAC;
  localparam int MAXV = (1 << 19) - 1;
  localparam int MINV = -(1 << 19);

  int ref_max = MAXV;
  int n_clamp = 0;    // number of saturated sums and products so far

  function automatic void set_int_lens(input int int_lens);
    ref_max = (1 << (int_lens + FRAC - 1)) - 1;
  endfunction

  function automatic int sat(input longint v);
    if (v > ref_max)      begin n_clamp++; return ref_max; end
    if (v < -ref_max - 1) begin n_clamp++; return -ref_max - 1; end
    return int'(v);
  endfunction

  function automatic int mmul(input int a, input int b);
    longint ma, mb, m;
    ma = (a < 0) ? -longint'(a) : longint'(a);
    mb = (b < 0) ? -longint'(b) : longint'(b);
    m  = (ma * mb) >> FRAC;
    if (m > ref_max) begin n_clamp++; m = ref_max; end
    return ((a < 0) != (b < 0)) ? -int'(m) : int'(m);
  endfunction

  function automatic int madd(input int a, input int b);
    return sat(longint'(a) + longint'(b));
  endfunction

  function automatic int msig(input int x);
    if (x <= -2 * ONE) return 0;
    if (x >= 2 * ONE)  return ONE;
    return (ONE / 2) + (x >>> 2);
  endfunction

  function automatic int mneuron(input int x1, input int x2, input int w1, input int w2, input int th);
    return msig(madd(madd(mmul(x1, w1), mmul(x2, w2)), th));
  endfunction

  // random value in the 20-bit range, biased toward small magnitudes
  function automatic int rnd_fx(input int range_bits);
    int r;
    r = int'($urandom_range((1 << range_bits) - 1));
    return ($urandom_range(1) != 0) ? -r : r;
  endfunction

  // 20-bit pattern to int
  function automatic int s20(input logic [19:0] v);
    return int'(signed'(v));
  endfunction
  // nine parameters in the order v11, v21, v12, v22, w11, w21, th_h1, th_h2, th_o
  typedef int wvec_t [9];

  // one forward pass; returns b1, b2, c
  function automatic void mforward(input wvec_t w, input int x1, input int x2,
                                   output int b1, output int b2, output int c);
    b1 = mneuron(x1, x2, w[0], w[1], w[6]);
    b2 = mneuron(x1, x2, w[2], w[3], w[7]);
    c  = mneuron(b1, b2, w[4], w[5], w[8]);
  endfunction

  // error terms of the output node and the two hidden nodes
  function automatic void mbackward(input int b1, input int b2, input int c, input int t,
                                    input int w11, input int w21,
                                    output int d, output int e1, output int e2);
    d  = mmul(mmul(c, sat(ONE - c)), sat(longint'(t) - c));
    e1 = mmul(mmul(b1, sat(ONE - b1)), mmul(w11, d));
    e2 = mmul(mmul(b2, sat(ONE - b2)), mmul(w21, d));
  endfunction

  // new parameters from the learning rate, inputs, activations and error terms
  function automatic wvec_t mupdate(input wvec_t w, input int alpha, input int x1, input int x2,
                                    input int b1, input int b2, input int d, input int e1,
                                    input int e2);
    wvec_t n;
    int ad, ae1, ae2;
    ad = mmul(alpha, d); ae1 = mmul(alpha, e1); ae2 = mmul(alpha, e2);
    n[0] = madd(w[0], mmul(ae1, x1));
    n[1] = madd(w[1], mmul(ae1, x2));
    n[2] = madd(w[2], mmul(ae2, x1));
    n[3] = madd(w[3], mmul(ae2, x2));
    n[4] = madd(w[4], mmul(ad, b1));
    n[5] = madd(w[5], mmul(ad, b2));
    n[6] = madd(w[6], ae1);
    n[7] = madd(w[7], ae2);
    n[8] = madd(w[8], ad);
    return n;
  endfunction

  // one complete training step on one pattern
  function automatic wvec_t mtrain(input wvec_t w, input int alpha, input int x1, input int x2,
                                   input int t);
    int b1, b2, c, d, e1, e2;
    mforward(w, x1, x2, b1, b2, c);
    mbackward(b1, b2, c, t, w[4], w[5], d, e1, e2);
    return mupdate(w, alpha, x1, x2, b1, b2, d, e1, e2);
  endfunction
endpackage
