// keccak_ref_pkg: unmasked behavioural reference of KECCAK-f[25*w] for the testbenches,
// plus helpers to split values into random shares and to recombine them.
//
// Written straight from the KECCAK specification with the constants as published
// (24 64-bit round constants, rho offset table), independently of the RTL, which
// derives them from the LFSR and the offset walk instead. Lanes are held in 64-bit
// words, only the low w bits are used; lane index x + 5*y.
package keccak_ref_pkg;

  typedef logic [24:0][63:0] kstate_t;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // ROT[x][y]
  localparam int ROT [5][5] = '{
    '{0, 36, 3, 41, 18}, '{1, 44, 10, 45, 2}, '{62, 6, 43, 15, 61},
    '{28, 55, 25, 21, 56}, '{27, 20, 39, 8, 14}};

  function automatic logic [63:0] lmask(int w);
    return (w == 64) ? '1 : ((64'd1 << w) - 1);
  endfunction

  function automatic logic [63:0] rot(logic [63:0] v, int n, int w);
    n = n % w;
    if (n == 0) return v & lmask(w);
    return ((v << n) | (v >> (w - n))) & lmask(w);
  endfunction

  function automatic int rounds(int w);
    int l = 0;
    while ((1 << l) < w) l++;
    return 12 + 2 * l;
  endfunction

  function automatic kstate_t round_fn(kstate_t a, int ir, int w);
    logic [4:0][63:0] c, d;
    kstate_t b, o;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rot(c[(x+1)%5], 1, w);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rot(a[x+5*y], ROT[x][y], w);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5+5*y] & b[(x+2)%5+5*y] & lmask(w));
    o[0] = o[0] ^ (RC[ir] & lmask(w));
    return o;
  endfunction

  function automatic kstate_t keccak_f(kstate_t a, int w);
    for (int ir = 0; ir < rounds(w); ir++) a = round_fn(a, ir, w);
    return a;
  endfunction

endpackage
