// rns_pkg: shared types and elaboration-time helper functions for the RNS
// scaler.
//
// The scaler works on a residue number system (RNS) with N pairwise coprime
// moduli m_1..m_N and a dynamic range M = m_1*m_2*...*m_N. All constants the
// lookup stages need (M, M_i = M/m_i, <M_i^-1>_{m_i}, <K^-1>_{m_i}) are
// derived from the module parameters with the functions below while the
// design is elaborated, so changing the moduli or the scale factor needs no
// table regeneration. Nothing here describes hardware by itself.
//
// wide_t bounds the dynamic range that can be configured: M must fit in
// 128 bits, which covers the largest moduli set considered for this design
// (twelve 7-bit moduli, M about 2^79).
package rns_pkg;

  localparam int unsigned WIDE = 128;
  typedef logic [WIDE-1:0] wide_t;

  // Moduli are passed as a fixed-size list; only the first N entries are
  // used and the rest are conventionally 0.
  localparam int unsigned MAX_N = 16;
  typedef int unsigned moduli_t [MAX_N];

  // Number of r-input lookup cycles needed to combine n operands in a tree:
  // ceil(log_r n), with 0 for a single operand.
  function automatic int unsigned clog_r(int unsigned n, int unsigned r);
    int unsigned levels;
    int unsigned cnt;
    levels = 0;
    cnt    = n;
    while (cnt > 1) begin
      cnt    = (cnt + r - 1) / r;
      levels = levels + 1;
    end
    return levels;
  endfunction

  function automatic int unsigned ipow(int unsigned b, int unsigned e);
    int unsigned p;
    p = 1;
    for (int unsigned i = 0; i < e; i++) p = p * b;
    return p;
  endfunction

  // Shape of the r-ary reduction tree. Level 0 holds the n operands; level l
  // (1..T, T = clog_r(n, r)) uses tree_tables(n, r, l) tables on the first
  // items of level l-1, r items per table, and passes the other items on
  // unchanged. Each level combines only as many items as needed for the rest
  // to be combinable in the remaining levels, so every table except the last
  // takes r inputs and the whole tree uses ceil((n-1)/(r-1)) tables.
  function automatic int unsigned tree_items(int unsigned n, int unsigned r,
                                             int unsigned level);
    int unsigned t;
    int unsigned cnt;
    int unsigned g;
    t   = clog_r(n, r);
    cnt = n;
    for (int unsigned l = 1; l <= level; l++) begin
      g   = tree_groups(cnt, r, t - l);
      cnt = g + ((cnt > g * r) ? cnt - g * r : 0);
    end
    return cnt;
  endfunction

  function automatic int unsigned tree_tables(int unsigned n, int unsigned r,
                                              int unsigned level);
    return tree_groups(tree_items(n, r, level - 1), r, clog_r(n, r) - level);
  endfunction

  // Tables needed on cnt items so that at most r^rest items remain.
  function automatic int unsigned tree_groups(int unsigned cnt, int unsigned r,
                                              int unsigned rest);
    int unsigned cap;
    cap = ipow(r, rest);
    return (cnt > cap) ? (cnt - cap + r - 2) / (r - 1) : 0;
  endfunction

  // Total number of tables in the tree.
  function automatic int unsigned tree_total(int unsigned n, int unsigned r);
    int unsigned s;
    s = 0;
    for (int unsigned l = 1; l <= clog_r(n, r); l++) s = s + tree_tables(n, r, l);
    return s;
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Multiplicative inverse of a modulo m (0 if it does not exist). m is a
  // channel modulus, small enough for an exhaustive search.
  function automatic int unsigned mod_inverse(int unsigned a, int unsigned m);
    longint unsigned am;
    longint unsigned mm;
    int unsigned     inv;
    mm  = 64'(m);
    am  = (mm == 0) ? 0 : 64'(a) % mm;
    inv = 0;
    for (int unsigned v = 1; v < m; v++) begin
      if (inv == 0 && (am * 64'(v)) % mm == 1) inv = v;
    end
    return inv;
  endfunction

  // Number of bits needed to hold every value 0..v (at least 1).
  function automatic int unsigned bits_for(wide_t v);
    int unsigned b;
    b = 1;
    for (int unsigned i = 0; i < WIDE; i++) if (v[i]) b = i + 1;
    return b;
  endfunction

endpackage
