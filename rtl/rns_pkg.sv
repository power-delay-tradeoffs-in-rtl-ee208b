// rns_pkg: constants and elaboration-time helpers shared by the RNS datapath.
//
// The residue number system used here is the moduli set {11, 13, 29}; its
// dynamic range M = 11*13*29 = 4147 covers 12 bits. Every modulus is prime,
// so each has a primitive root q whose powers q^w mod m (w = 0 .. m-2) run
// through all non-zero residues. That turns a modular product into a sum of
// indices (the "isomorphism" used by the multipliers).
//
// The functions below are only evaluated while elaborating: the modules use
// them to fill their look-up tables with constants, so the tables end up as
// plain combinational logic. Nothing here is evaluated at run time.
//
// Index encodings (this design's own choice):
//   * x index, K bits, K = clog2(m-1): 0 .. m-2 is the index, the all-ones
//     code (never a valid index because m-1 < 2^K) marks a zero operand.
//   * e index, K+1 bits two's complement: e = y - (m-1), always negative for
//     a non-zero operand; e = 0 (sign bit clear) marks a zero operand.
package rns_pkg;

  localparam int unsigned NUM_MOD = 3;
  localparam int unsigned MODULI [NUM_MOD] = '{11, 13, 29};
  // widest residue / index field over the moduli set (29 needs 5 bits)
  localparam int unsigned RES_W = 5;

  // q^w mod m
  function automatic int unsigned powmod(int unsigned q, int unsigned w, int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < w; i++) r = (r * q) % m;
    return r;
  endfunction

  // multiplicative order of q mod m (q and m coprime, m > 1)
  function automatic int unsigned mult_order(int unsigned q, int unsigned m);
    int unsigned r;
    int unsigned w;
    r = q % m;
    w = 1;
    while (r != 1 && w < m) begin
      r = (r * q) % m;
      w++;
    end
    return w;
  endfunction

  // smallest primitive root of the prime m
  function automatic int unsigned prim_root(int unsigned m);
    for (int unsigned q = 2; q < m; q++)
      if (mult_order(q, m) == m - 1) return q;
    return 1;
  endfunction

  // discrete logarithm: the w in [0, m-2] with q^w mod m == p (p in [1, m-1])
  function automatic int unsigned dlog(int unsigned m, int unsigned p);
    int unsigned q;
    int unsigned r;
    q = prim_root(m);
    r = 1;
    for (int unsigned w = 0; w < m - 1; w++) begin
      if (r == p) return w;
      r = (r * q) % m;
    end
    return 0;
  endfunction

  // width of the isomorphism index for modulus m: K = clog2(m-1)
  function automatic int unsigned idx_w(int unsigned m);
    return $clog2(m - 1);
  endfunction

  // width of a residue for modulus m: n = clog2(m)
  function automatic int unsigned res_w(int unsigned m);
    return $clog2(m);
  endfunction

endpackage
