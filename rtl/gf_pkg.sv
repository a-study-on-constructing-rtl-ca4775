// gf_pkg: constants and helper functions shared by the GF(P^m) adder and
// multiplier blocks.
//
// Every GF(P) digit is carried as an unsigned binary number 0..P-1 in
// digit_width(P) bits. The functions below are used only to build constant
// lookup tables at elaboration time (the cyclic gates, the constant
// multipliers and the reduction codes) and by the registers that negate the
// polynomial coefficients; the datapath itself is built from T-gates.
package gf_pkg;

  // Number of bits for one digit of GF(P): clog2(P), at least 1.
  function automatic int unsigned digit_width(input int unsigned p);
    return (p > 2) ? $clog2(p) : 1;
  endfunction

  // (a + b) mod p
  function automatic int unsigned mod_add(input int unsigned a, input int unsigned b,
                                          input int unsigned p);
    return (a + b) % p;
  endfunction

  // (a * b) mod p
  function automatic int unsigned mod_mul(input int unsigned a, input int unsigned b,
                                          input int unsigned p);
    return (a * b) % p;
  endfunction

  // (-a) mod p
  function automatic int unsigned mod_neg(input int unsigned a, input int unsigned p);
    return (p - (a % p)) % p;
  endfunction

endpackage
