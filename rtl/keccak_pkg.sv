// keccak_pkg: types and constant functions shared by the masked KECCAK design.
//
// Bit layout used throughout: a slice is 25 bits, bit (x + 5*y) holding lane (x,y);
// a lane is W bits, bit z belonging to slice z. A shared value carries one copy per
// share domain (domain A = share 0, B = share 1, ...). The round constants and the
// rho offsets are derived here from the KECCAK reference definitions (the rc LFSR and
// the (t+1)(t+2)/2 offset walk) rather than stored, so any lane width W = 2^l works.
//
// The three architectures and the indexing of the DOM random bits follow the published
// design; computing the constants at elaboration time instead of storing them is this
// design's choice.
package keccak_pkg;

  // Architecture selected at elaboration time (see keccak_dom).
  typedef enum logic [1:0] {
    ARCH_SERIAL_AREA = 2'd0,  // every step slice-iterative, rho iterative over W cycles
    ARCH_SERIAL_TP   = 2'd1,  // slice-iterative, rho and pi together in one cycle
    ARCH_PARALLEL    = 2'd2   // one round per 1..3 cycles on the full state
  } arch_e;

  // Operations of the serial state memory.
  typedef enum logic [2:0] {
    ST_HOLD  = 3'd0,
    ST_CLEAR = 3'd1,
    ST_SHIFT = 3'd2,  // shift SP slices out, write SP processed slices in
    ST_RHO   = 3'd3,  // iterative rho: selected lanes rotate by one bit
    ST_RHOPI = 3'd4,  // rho and pi applied to the whole state in one cycle
    ST_LABS  = 3'd5   // lane-based absorption of one AW-bit word of the rate
  } state_op_e;

  function automatic int unsigned clog2_w(int unsigned w);
    int unsigned l = 0;
    while ((1 << l) < w) l++;
    return l;
  endfunction

  // Number of rounds of KECCAK-f[25*W]: 12 + 2l.
  function automatic int unsigned num_rounds(int unsigned w);
    return 12 + 2 * clog2_w(w);
  endfunction

  // Fresh random bits one DOM AND consumes per evaluation (Eq. 2: d(d+1)/2). With the
  // first-order randomness optimisation the shares of c take the place of Z.
  function automatic int unsigned dom_rand_used(int unsigned shares, bit rand_opt);
    if (shares < 2) return 0;
    if (shares == 2 && rand_opt) return 0;
    return shares * (shares - 1) / 2;
  endfunction

  // Same, but at least one so that it can size a port.
  function automatic int unsigned dom_rand_port(int unsigned shares, bit rand_opt);
    int unsigned n = dom_rand_used(shares, rand_opt);
    return (n == 0) ? 1 : n;
  endfunction

  // Index of the Z bit shared by cross terms t(i,j) and t(j,i), Eq. 2.
  function automatic int unsigned dom_z_index(int unsigned i, int unsigned j);
    return (i < j) ? (i + j * (j - 1) / 2) : (j + i * (i - 1) / 2);
  endfunction

  // Output bit rc(t) of the KECCAK round-constant LFSR x^8 + x^6 + x^5 + x^4 + 1.
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 9'b0_0000_0001;                // R[0] = 1
    for (int unsigned i = 1; i <= t % 255; i++) begin
      r = {r[7:0], 1'b0};              // R = 0 || R
      r[0] = r[0] ^ r[8];
      r[4] = r[4] ^ r[8];
      r[5] = r[5] ^ r[8];
      r[6] = r[6] ^ r[8];
    end
    return r[0];
  endfunction

  // Round constant of round ir, lane width up to 64 bits (bits above W are zero).
  function automatic logic [63:0] round_const(int unsigned ir, int unsigned w);
    logic [63:0] rc = '0;
    for (int unsigned j = 0; j <= clog2_w(w); j++) rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return rc;
  endfunction

  // rho offset of lane (x,y), reduced modulo the lane width W.
  function automatic int unsigned rho_offset(int unsigned x, int unsigned y, int unsigned w);
    int unsigned cx = 1, cy = 0, nx;
    if (x == 0 && y == 0) return 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return (((t + 1) * (t + 2)) / 2) % w;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  // pi: lane (x,y) of the result is lane pi_src(x,y) of the input, (x+3y mod 5, x).
  function automatic int unsigned pi_src(int unsigned x, int unsigned y);
    return ((x + 3 * y) % 5) + 5 * x;
  endfunction

endpackage
