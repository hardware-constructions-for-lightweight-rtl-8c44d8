// qarma_ref_pkg: behavioural reference model of QARMA-128 for the
// testbenches, written from the cipher description as a straight-line
// sequence of operations: a 16-entry sigma table, MixColumns from an
// explicit exponent matrix, and decryption as the literal inverse of
// encryption (rounds undone in reverse order), not through the key
// rearrangement the hardware uses. Only the constants are shared with the
// design.
package qarma_ref_pkg;
  import qarma_pkg::ALPHA;
  import qarma_pkg::round_const;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   c8_t;

  localparam logic [3:0] SIGMA [16] = '{4'hA, 4'hD, 4'hE, 4'h6, 4'hF, 4'h7, 4'h3, 4'h5,
                                        4'h9, 4'h8, 4'h0, 4'hC, 4'hB, 4'h1, 4'h2, 4'h4};
  localparam int T_P  [16] = '{0, 11, 6, 13, 10, 1, 12, 7, 5, 14, 3, 8, 15, 4, 9, 2};
  localparam int H_P  [16] = '{6, 5, 14, 15, 0, 1, 2, 3, 7, 12, 13, 4, 8, 9, 10, 11};
  // exponent of rho in M8, -1 for the zero entry
  localparam int MEXP [4][4] = '{'{-1, 1, 4, 5}, '{5, -1, 1, 4}, '{4, 5, -1, 1}, '{1, 4, 5, -1}};

  typedef c8_t cells_t [16];

  function automatic cells_t to_cells(blk_t b);
    cells_t c;
    for (int i = 0; i < 16; i++) c[i] = b[127 - 8*i -: 8];
    return c;
  endfunction

  function automatic blk_t from_cells(cells_t c);
    blk_t b;
    for (int i = 0; i < 16; i++) b[127 - 8*i -: 8] = c[i];
    return b;
  endfunction

  function automatic c8_t sbox8(c8_t x);
    return {SIGMA[x[7:4]], SIGMA[x[3:0]]};
  endfunction

  function automatic blk_t sub(blk_t b);
    cells_t c = to_cells(b);
    foreach (c[i]) c[i] = sbox8(c[i]);
    return from_cells(c);
  endfunction

  function automatic c8_t rot(c8_t x, int n);
    c8_t r = x;
    for (int k = 0; k < n; k++) r = {r[6:0], r[7]};
    return r;
  endfunction

  function automatic blk_t mix(blk_t b);
    cells_t c = to_cells(b), o;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++) begin
        o[4*row + col] = '0;
        for (int k = 0; k < 4; k++)
          if (MEXP[row][k] >= 0) o[4*row + col] ^= rot(c[4*k + col], MEXP[row][k]);
      end
    return from_cells(o);
  endfunction

  function automatic blk_t shuf(blk_t b);      // tau
    cells_t c = to_cells(b), o;
    for (int i = 0; i < 16; i++) o[i] = c[T_P[i]];
    return from_cells(o);
  endfunction

  function automatic blk_t shuf_inv(blk_t b);
    cells_t c = to_cells(b), o;
    for (int i = 0; i < 16; i++) o[T_P[i]] = c[i];
    return from_cells(o);
  endfunction

  function automatic blk_t tweak_next(blk_t t);
    cells_t c = to_cells(t), o;
    for (int i = 0; i < 16; i++) o[i] = c[H_P[i]];
    foreach (o[i])
      if (i inside {0, 1, 3, 4, 8, 11, 13}) o[i] = {o[i][0] ^ o[i][2], o[i][7:1]};
    return from_cells(o);
  endfunction

  function automatic blk_t fwd(blk_t s, blk_t tk);
    return sub(mix(shuf(s ^ tk)));
  endfunction

  function automatic blk_t bwd(blk_t s, blk_t tk);
    return shuf_inv(mix(sub(s))) ^ tk;
  endfunction

  function automatic blk_t encrypt(blk_t p, blk_t t, logic [255:0] key, int r);
    blk_t w0 = key[255:128], k0 = key[127:0];
    blk_t w1 = {w0[0], w0[127:1]} ^ {127'b0, w0[127]};
    blk_t tw [0:31];
    blk_t s;
    tw[0] = t;
    for (int i = 1; i <= r; i++) tw[i] = tweak_next(tw[i-1]);
    s = sub(p ^ w0 ^ k0 ^ t);
    for (int i = 1; i < r; i++) s = fwd(s, k0 ^ tw[i] ^ round_const(i));
    s = fwd(s, w1 ^ tw[r]);
    s = shuf_inv(mix(shuf(s)) ^ k0);
    s = bwd(s, w0 ^ tw[r]);
    for (int i = r - 1; i >= 1; i--) s = bwd(s, k0 ^ ALPHA ^ tw[i] ^ round_const(i));
    s = sub(s) ^ k0 ^ ALPHA ^ t;
    return s ^ w1;
  endfunction

  // Literal inverse of encrypt: every step undone in reverse order.
  function automatic blk_t decrypt(blk_t c, blk_t t, logic [255:0] key, int r);
    blk_t w0 = key[255:128], k0 = key[127:0];
    blk_t w1 = {w0[0], w0[127:1]} ^ {127'b0, w0[127]};
    blk_t tw [0:31];
    blk_t s;
    tw[0] = t;
    for (int i = 1; i <= r; i++) tw[i] = tweak_next(tw[i-1]);
    s = c ^ w1;
    s = sub(s ^ k0 ^ ALPHA ^ t);                                   // undo last short round
    for (int i = 1; i < r; i++)                                    // undo backward rounds
      s = sub(mix(shuf(s ^ k0 ^ ALPHA ^ tw[i] ^ round_const(i))));
    s = sub(mix(shuf(s ^ w0 ^ tw[r])));                            // undo central backward round
    s = shuf_inv(mix(shuf(s) ^ k0));                               // undo reflector
    s = shuf_inv(mix(sub(s))) ^ w1 ^ tw[r];                         // undo central forward round
    for (int i = r - 1; i >= 1; i--)                               // undo forward rounds
      s = shuf_inv(mix(sub(s))) ^ k0 ^ tw[i] ^ round_const(i);
    s = sub(s) ^ k0 ^ t;                                           // undo first short round
    return s ^ w0;
  endfunction
endpackage
