// Shared constants and elaboration-time helpers for the reversible RNS datapath.
//
// The design works on the three-moduli set {2^n-1, 2^(n+k), 2^n+1}. DEF_N and DEF_K
// are the default channel parameters used by every block (n = 4 as in the n = 4
// circuit drawings, k = 0 as in the multiplication case study). The functions here
// are evaluated only while elaborating: they compute the correction constant that the
// modulo 2^n+1 operand reducers add as an extra row, and the rotation amounts the
// reverse converter uses for multiplications by powers of two modulo 2^(2n)-1.
package rev_rns_pkg;

  parameter int unsigned DEF_N = 4;
  parameter int unsigned DEF_K = 0;

  // Non-negative remainder of v modulo m.
  function automatic longint pmod(longint v, longint m);
    longint r;
    r = v % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

  // Constant row for rev_sum_mod2np1: with ROWS operand rows reduced by ROWS-1 levels
  // of carry-save adders with complemented end-around carry (each level adds +1) and a
  // final adder that adds +1 more, the constant row must be |-BIAS - (ROWS-1) - 1|.
  // A result equal to 2^n does not fit n bits; it is then sent as 2^n-1 plus the
  // final adder's carry input (see ceac_const_cin).
  function automatic longint ceac_const_raw(int unsigned n, int unsigned rows, longint bias);
    return pmod(-bias - longint'(rows), (longint'(1) << n) + 1);
  endfunction

  function automatic longint ceac_const(int unsigned n, int unsigned rows, longint bias);
    longint c;
    c = ceac_const_raw(n, rows, bias);
    if (c == (longint'(1) << n)) c = c - 1;
    return c;
  endfunction

  function automatic bit ceac_const_cin(int unsigned n, int unsigned rows, longint bias);
    return ceac_const_raw(n, rows, bias) == (longint'(1) << n);
  endfunction

endpackage
