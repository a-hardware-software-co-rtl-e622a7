// tb_fp_pkg: reference helpers for the floating-point testbenches.
//
// f2r converts a packed single-precision word to a real (zero exponent field reads as zero),
// rand_f makes a random normal single-precision word with an exponent in a given window,
// close_enough compares a hardware result with an exactly computed real value, allowing
// 'ulps' units in the last place of the exact value.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] x);
    logic [10:0] e;
    if (x[30:23] == 8'd0) return 0.0;
    e = 11'(x[30:23]) + 11'd896;           // rebias 127 -> 1023
    return $bitstoreal({x[31], e, x[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] rand_f(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic bit close_enough(input logic [31:0] hw, input real exact, input real ulps);
    real tol;
    tol = ulps * absr(exact) / 8388608.0;
    if (tol < 1.0e-38) tol = 1.0e-38;
    return absr(f2r(hw) - exact) <= tol;
  endfunction

  // 2**n for an integer n
  function automatic real pow2(input int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // value of an unpacked operand: sign, biased exponent, mantissa of mw bits whose MSB has
  // weight 2**0
  function automatic real uval(input bit s, input int e, input logic [63:0] m, input int mw);
    real v;
    v = real'(m) * pow2(e - 127 - (mw - 1));
    return s ? -v : v;
  endfunction
endpackage
