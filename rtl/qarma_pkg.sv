// qarma_pkg: types, constants and cell-level helper functions shared by the
// QARMA-128 error-detecting datapath.
//
// The 128-bit internal state is sixteen 8-bit cells s0..s15; cell 0 is the
// most significant byte and the cells form a 4x4 array in row-major order
// (cell i sits in row i/4, column i%4). The cell permutations tau and h and
// the MixColumns matrix M8 = Q8 = circ(0, rho, rho^4, rho^5) are those of
// QARMA-128; rho is a one-bit left rotation inside a cell.
//
// The round constants and alpha are not part of the published description
// this design follows. Here they are consecutive 128-bit words of the
// fractional part of pi written in hexadecimal (pi = 3.243F6A88...):
// alpha is word 0 and c_i is word i, with c_0 = 0. This is a choice of this
// design; swap in reference constants before interoperating with other
// QARMA implementations.
package qarma_pkg;

  typedef logic [127:0] state_t;
  typedef logic [7:0]   cell_t;

  localparam int unsigned MAX_R = 11;   // number of constants held below

  // Words 0..11 of the fractional hex digits of pi, 128 bits each.
  localparam state_t PI_WORDS [0:MAX_R] = '{
    128'h243F6A8885A308D313198A2E03707344,
    128'hA4093822299F31D0082EFA98EC4E6C89,
    128'h452821E638D01377BE5466CF34E90C6C,
    128'hC0AC29B7C97C50DD3F84D5B5B5470917,
    128'h9216D5D98979FB1BD1310BA698DFB5AC,
    128'h2FFD72DBD01ADFB7B8E1AFED6A267E96,
    128'hBA7C9045F12C7F9924A19947B3916CF7,
    128'h0801F2E2858EFC16636920D871574E69,
    128'hA458FEA3F4933D7E0D95748F728EB658,
    128'h718BCD5882154AEE7B54A41DC25A59B5,
    128'h9C30D5392AF26013C5D1B023286085F0,
    128'hCA417918B8DB38EF8E79DCB0603A180E
  };

  localparam state_t ALPHA = PI_WORDS[0];

  // Round constant c_i; c_0 is zero.
  function automatic state_t round_const(int unsigned i);
    return (i == 0) ? '0 : PI_WORDS[i];
  endfunction

  // ShuffleCells tau and tweak permutation h: (P(x))_i = x_{P[i]}.
  localparam int unsigned TAU [16] = '{0, 11, 6, 13, 10, 1, 12, 7, 5, 14, 3, 8, 15, 4, 9, 2};
  localparam int unsigned HP  [16] = '{6, 5, 14, 15, 0, 1, 2, 3, 7, 12, 13, 4, 8, 9, 10, 11};

  // Tweak cells that go through the LFSR omega after h.
  localparam logic [15:0] OMEGA_CELLS = 16'b0010_1001_0001_1011; // bit i set: cell i (0,1,3,4,8,11,13)

  // Error-detection flags, one per scheme.
  typedef struct packed {
    logic par;  // one-bit S-box signature
    logic ilv;  // interleaved S-box signature
    logic crc;  // CRC-3 S-box signature
    logic rec;  // recomputation with swapped nibbles
    logic mc;   // MixColumns column parity
    logic ark;  // AddRoundTweakey cell parity
  } ed_flags_t;

  // Where an injected fault lands.
  typedef enum logic [1:0] {
    SITE_SBOX = 2'd0,   // stuck-at on the sigma inputs of one S-box
    SITE_MC   = 2'd1,   // stuck-at on one MixColumns output cell
    SITE_ARK  = 2'd2    // stuck-at on one AddRoundTweakey output cell
  } fault_site_e;

  typedef struct packed {
    logic        en;
    logic [4:0]  stage;  // pipeline stage (round) to hit
    fault_site_e site;
    logic [3:0]  cell_idx;
    cell_t       sa0;    // bits forced to 0
    cell_t       sa1;    // bits forced to 1
  } fault_t;

  // Keys used along the pipeline for one block.
  typedef struct packed {
    state_t w_in;    // whitening before the first round; also keys the central backward round
    state_t w_out;   // whitening after the last round; also keys the central forward round
    state_t k_fwd;   // core key of the forward rounds
    state_t k_bwd;   // core key of the backward rounds
    state_t k_ref;   // key added inside the pseudo-reflector
  } keys_t;

  function automatic cell_t get_cell(state_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic cell_t rotl8(cell_t x, int unsigned n);
    return cell_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic state_t permute(state_t s, int unsigned p [16]);
    state_t r;
    for (int unsigned i = 0; i < 16; i++) r[127 - 8*i -: 8] = get_cell(s, p[i]);
    return r;
  endfunction

  function automatic state_t permute_inv(state_t s, int unsigned p [16]);
    state_t r;
    for (int unsigned i = 0; i < 16; i++) r[127 - 8*p[i] -: 8] = get_cell(s, i);
    return r;
  endfunction

  // Column-wise multiplication by M8 = Q8; the matrix is involutory.
  function automatic state_t mix_columns(state_t s);
    state_t r;
    for (int unsigned col = 0; col < 4; col++)
      for (int unsigned row = 0; row < 4; row++)
        r[127 - 8*(4*row + col) -: 8] =
            rotl8(get_cell(s, 4*((row + 1) % 4) + col), 1) ^
            rotl8(get_cell(s, 4*((row + 2) % 4) + col), 4) ^
            rotl8(get_cell(s, 4*((row + 3) % 4) + col), 5);
    return r;
  endfunction

endpackage
