// rrns_pkg: types and elaboration-time helpers shared by the RNS FIR filter.
//
// The filter works in the residue number system with the three-modulus set
// {2^n-1, 2^n, 2^n+1}. Each modulus gets its own arithmetic channel; the
// channel kind below selects which adder and multiplier a channel uses.
// pow2_mod() gives |2^e| mod m at elaboration time; the converters use it to
// build their correction constants.
package rrns_pkg;

  // Channel kinds: modulo 2^n-1, modulo 2^n, modulo 2^n+1.
  typedef enum logic [1:0] {
    CH_M1 = 2'd0,
    CH_M0 = 2'd1,
    CH_P1 = 2'd2
  } ch_kind_e;

  // |2^e| mod m, for small m (elaboration-time constants only).
  function automatic int unsigned pow2_mod(input int unsigned e, input int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < e; i++) r = (r * 2) % m;
    return r;
  endfunction

endpackage
