// rns_pkg -- elaboration-time helpers shared by the RNS scaler modules.
//
// The scaler needs a few constants that depend only on the moduli: the
// multiplicative inverse |M4^-1|_m4 and the residue |M4|_m4 of the product
// M4 = (2^2n - 1) * 2^n of the three base moduli. They are computed here by
// constant functions so that every parameter set gets exact values; nothing
// in this package produces logic.
package rns_pkg;

  // |a * b|_m for small operands (m < 2^31).
  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned m);
    return ((a % m) * (b % m)) % m;
  endfunction

  // |2^e|_m by repeated doubling.
  function automatic longint unsigned pow2mod(int unsigned e, longint unsigned m);
    longint unsigned v;
    v = 1 % m;
    for (int unsigned i = 0; i < e; i++) v = (v * 2) % m;
    return v;
  endfunction

  // |M4|_m with M4 = (2^(2n) - 1) * 2^n, the product of {2^n-1, 2^n, 2^n+1}.
  function automatic longint unsigned m123_mod(int unsigned n, longint unsigned m);
    longint unsigned a;
    a = (pow2mod(2 * n, m) + m - (1 % m)) % m;
    return mulmod(a, pow2mod(n, m), m);
  endfunction

  // Multiplicative inverse |a^-1|_m by exhaustive search (m is small);
  // returns 0 when a and m are not co-prime.
  function automatic longint unsigned invmod(longint unsigned a, longint unsigned m);
    for (longint unsigned k = 1; k < m; k++)
      if (mulmod(a, k, m) == 1) return k;
    return 0;
  endfunction

endpackage
