// rns_pkg: constants and elaboration-time functions of the residue number
// system built on the three-moduli set {2^n-1, 2^n, 2^n+1}.
//
// Channel 0 is modulus 2^n-1, channel 1 is 2^n and channel 2 is 2^n+1. The
// dynamic range is M = (2^n-1) * 2^n * (2^n+1) = 2^n * (2^(2n)-1), so a
// binary number in the range [0, M) needs 3n bits. The functions below give
// the Chinese-remainder-theorem (CRT) terms: M_i = M / m_i, the inverse of
// M_i modulo m_i, and their product C_i = M_i * |M_i^-1|_{m_i}, the constant
// that the reverse converter keeps in ROM. Everything here is evaluated at
// elaboration time only; nothing in this package becomes hardware by itself.
// All arithmetic is done in 64 bits, which limits n to MAX_N.
package rns_pkg;

  // Largest n for which C_i * (m_i - 1) still fits the 64-bit arithmetic.
  localparam int unsigned MAX_N = 15;

  // Number of moduli (residue channels).
  localparam int unsigned NUM_CH = 3;

  typedef longint unsigned u64_t;

  // Modulus of channel ch for a given n.
  function automatic u64_t modulus(input int unsigned n, input int unsigned ch);
    u64_t p;
    p = u64_t'(1) << n;
    case (ch)
      0:       return p - 1;
      1:       return p;
      default: return p + 1;
    endcase
  endfunction

  // Dynamic range M = 2^n * (2^(2n) - 1).
  function automatic u64_t dyn_range(input int unsigned n);
    return modulus(n, 0) * modulus(n, 1) * modulus(n, 2);
  endfunction

  // M_i = M / m_i.
  function automatic u64_t big_m(input int unsigned n, input int unsigned ch);
    return dyn_range(n) / modulus(n, ch);
  endfunction

  // Multiplicative inverse of a modulo m by the extended Euclidean algorithm
  // (a and m are co-prime for every channel of this moduli set).
  function automatic u64_t mod_inverse(input u64_t a, input u64_t m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = longint'(m);
    r1 = longint'(a % m);
    t0 = 0;
    t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + longint'(m);
    return u64_t'(t0) % m;
  endfunction

  // CRT constant C_i = M_i * |M_i^-1|_{m_i}.
  function automatic u64_t crt_const(input int unsigned n, input int unsigned ch);
    return big_m(n, ch) * mod_inverse(big_m(n, ch) % modulus(n, ch), modulus(n, ch));
  endfunction

  // Largest value a residue port of channel ch can carry: channels 0 and 1
  // are n bits wide, channel 2 is n+1 bits wide.
  function automatic u64_t port_max(input int unsigned n, input int unsigned ch);
    return (ch == 2) ? ((u64_t'(1) << (n + 1)) - 1) : ((u64_t'(1) << n) - 1);
  endfunction

  // Largest possible sum of the three CRT products C_i * r_i over every
  // value the residue ports can carry.
  function automatic u64_t crt_max_sum(input int unsigned n);
    u64_t s;
    s = 0;
    for (int unsigned ch = 0; ch < NUM_CH; ch++)
      s += crt_const(n, ch) * port_max(n, ch);
    return s;
  endfunction

  // Number of bits needed to hold the value v.
  function automatic int unsigned bits_for(input u64_t v);
    int unsigned b;
    b = 1;
    while (b < 64 && (v >> b) != 0) b++;
    return b;
  endfunction

endpackage
