// tb_ref_pkg: reference GF(p) arithmetic for the testbenches.
//
// Plain wide-integer arithmetic (the simulator's own *, % and comparisons)
// on 384-bit values, so operands of up to 192 bits can be multiplied.  It is
// independent of the Krestenson-matrix and word-serial circuits under test.
// prime_below() gives the largest prime below 2^bits for the sizes the
// design is evaluated at (2^bits - c, c from a small table).
package tb_ref_pkg;
  typedef logic [383:0] big_t;

  function automatic big_t mulmod(input big_t a, input big_t b, input big_t p);
    return (a * b) % p;
  endfunction

  function automatic big_t addmod(input big_t a, input big_t b, input big_t p);
    return (a + b) % p;
  endfunction

  function automatic big_t submod(input big_t a, input big_t b, input big_t p);
    return (a + p - b) % p;
  endfunction

  function automatic big_t powmod(input big_t a, input big_t e, input big_t p);
    big_t r, x;
    r = 1;
    x = a % p;
    for (int i = 0; i < 384; i++) begin
      if (e[i]) r = mulmod(r, x, p);
      x = mulmod(x, x, p);
    end
    return r;
  endfunction

  // Inverse by Fermat's little theorem (p prime).
  function automatic big_t invmod(input big_t a, input big_t p);
    return powmod(a, p - 2, p);
  endfunction

  function automatic big_t prime_below(input int bits);
    int c;
    case (bits)
      23:  c = 15;
      46:  c = 21;
      69:  c = 19;
      92:  c = 83;
      115: c = 67;
      138: c = 105;
      161: c = 159;
      184: c = 33;
      default: c = 1;   // 2^bits - 1, odd but not necessarily prime
    endcase
    return (big_t'(1) << bits) - big_t'(c);
  endfunction

  // Random value below p.
  function automatic big_t rand_below(input big_t p);
    big_t r;
    for (int i = 0; i < 12; i++) r[i*32 +: 32] = $urandom;
    return r % p;
  endfunction
endpackage
