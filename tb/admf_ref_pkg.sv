// Reference arithmetic for the testbenches, written straight from the filter's
// defining equations and independent of the RTL:
//   next_lvl : step exponent rule (up when the last two decisions agree, down
//              when they differ, limited to 0..lmax)
//   wrap     : value of an exact integer in an ACC_W-bit two's-complement register
// Decisions are +1 / -1 integers here.
package admf_ref_pkg;

  function automatic int next_lvl(int c1, int c2, int l, int lmax);
    if (c1 == c2) return (l >= lmax) ? lmax : l + 1;
    else          return (l <= 0)    ? 0    : l - 1;
  endfunction

  function automatic longint wrap(longint v, int w);
    longint m;
    m = longint'(1) << w;
    v = v % m;
    if (v < 0) v += m;
    if (v >= m / 2) v -= m;
    return v;
  endfunction

endpackage
