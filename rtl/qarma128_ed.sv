// qarma128_ed: QARMA-128 tweakable block cipher with concurrent error
// detection, as a fully unrolled pipeline that accepts one 128-bit block
// per clock.
//
// QARMA is a three-round Even-Mansour construction: whitening with w0, a
// keyed forward permutation F of r rounds, a keyed central construction,
// the backward permutation F' of r rounds and whitening with w1. The 2r+2
// rounds map onto 2r+2 pipeline stages:
//   stage 0          P ^ w0, short forward round (tweakey k0 ^ T, S)
//   stages 1..r-1    forward rounds with k0 ^ T_i ^ c_i
//   stage r          central forward round with w1 ^ T_r
//   stage r+1        pseudo-reflector (key k1), central backward round with w0 ^ T_r
//   stages r+2..2r   backward rounds with k0 ^ alpha ^ T_i ^ c_i, i = r-1..1
//   stage 2r+1       short backward round, then ^ w1
// T_i is the tweak after i forward steps of the tweak schedule; every
// stage updates the tweak it receives and hands it on. The key words and
// the tweak travel down the pipeline with their block, so each block may
// use its own key, tweak and direction. Decryption uses the same stages
// with the keys rearranged by qarma_keysched.
//
// Every S-box carries the one-bit, interleaved and CRC-3 signature checks
// and the nibble-swap recomputation check, every MixColumns (and the Q of
// the reflector) a column-parity check, and every tweakey addition a
// cell-parity check. The flags of each scheme are ORed over the stages a
// block has passed and leave the pipeline with the block in out_err.
//
// Interface and timing: a block presented with in_valid = 1 appears on
// out_data with out_valid = 1 exactly 2R+2 cycles later; there is no
// back-pressure. ED_EN enables the schemes one by one (same bit order as
// ed_flags_t); a disabled scheme's flag stays 0 and synthesis removes its
// checking logic, which gives the single-scheme variants. rst_n is synchronous and active low and clears only the
// valid bits. The fault port injects one stuck-at fault into a chosen
// stage, operation and cell (test hook; hold fault.en low in normal use).
//
// The round count R, the round constants and the LFSR of the tweak
// schedule are choices of this design; the pipeline organisation is
// inferred from the one-block-per-cycle throughput of the reference
// implementation.
module qarma128_ed
  import qarma_pkg::*;
#(
  parameter int unsigned R       = 11,
  parameter bit          USE_LUT = 1'b0,
  parameter ed_flags_t   ED_EN   = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_decrypt,
  input  state_t       in_data,
  input  state_t       in_tweak,
  input  logic [255:0] in_key,
  input  fault_t       fault,
  output logic         out_valid,
  output state_t       out_data,
  output ed_flags_t    out_err
);
  localparam int unsigned NS = 2*R + 2;

  if (R < 2 || R > MAX_R + 1 || NS > 32) begin : g_bad_r
    $error("qarma128_ed: R must be between 2 and %0d", MAX_R + 1);
  end

  // Pipeline registers: the state leaving each stage and what travels with it.
  logic      v_q   [NS];
  state_t    st_q  [NS];
  state_t    tw_q  [NS];
  keys_t     ks_q  [NS];
  ed_flags_t err_q [NS];

  keys_t ks_in;
  qarma_keysched u_ks (.key(in_key), .decrypt(in_decrypt), .ks(ks_in));

  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic      v_i;
    state_t    st_i, tw_i, tw_o, st_o;
    keys_t     ks_i;
    ed_flags_t err_i, err_o;
    fault_t    f;

    if (s == 0) begin : g_src_in
      assign v_i   = in_valid;
      assign st_i  = in_data;
      assign tw_i  = in_tweak;
      assign ks_i  = ks_in;
      assign err_i = '0;
    end else begin : g_src_reg
      assign v_i   = v_q[s-1];
      assign st_i  = st_q[s-1];
      assign tw_i  = tw_q[s-1];
      assign ks_i  = ks_q[s-1];
      assign err_i = err_q[s-1];
    end

    always_comb begin
      f    = fault;
      f.en = fault.en && (fault.stage == 5'(s));
    end

    if (s == 0) begin : g_first
      assign tw_o = tw_i;
      qarma_fwd_round #(.SHORT(1'b1), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(st_i ^ ks_i.w_in), .tk(ks_i.k_fwd), .tweak(tw_o), .rc('0),
        .fault(f), .is_out(st_o), .err(err_o));
    end else if (s < R) begin : g_fwd
      qarma_tweak_upd #(.INVERSE(1'b0)) u_tw (.t_in(tw_i), .t_out(tw_o));
      qarma_fwd_round #(.SHORT(1'b0), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(st_i), .tk(ks_i.k_fwd), .tweak(tw_o), .rc(round_const(s)),
        .fault(f), .is_out(st_o), .err(err_o));
    end else if (s == R) begin : g_cfwd
      qarma_tweak_upd #(.INVERSE(1'b0)) u_tw (.t_in(tw_i), .t_out(tw_o));
      qarma_fwd_round #(.SHORT(1'b0), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(st_i), .tk(ks_i.w_out), .tweak(tw_o), .rc('0),
        .fault(f), .is_out(st_o), .err(err_o));
    end else if (s == R + 1) begin : g_cbwd
      state_t    refl;
      ed_flags_t e_ref, e_rnd;
      assign tw_o = tw_i;
      qarma_reflector u_ref (.is_in(st_i), .k1(ks_i.k_ref), .fault(f), .is_out(refl), .err(e_ref));
      qarma_bwd_round #(.SHORT(1'b0), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(refl), .tk(ks_i.w_in), .tweak(tw_o), .rc('0),
        .fault(f), .is_out(st_o), .err(e_rnd));
      assign err_o = e_ref | e_rnd;
    end else if (s < NS - 1) begin : g_bwd
      qarma_tweak_upd #(.INVERSE(1'b1)) u_tw (.t_in(tw_i), .t_out(tw_o));
      qarma_bwd_round #(.SHORT(1'b0), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(st_i), .tk(ks_i.k_bwd), .tweak(tw_o), .rc(round_const(NS - 1 - s)),
        .fault(f), .is_out(st_o), .err(err_o));
    end else begin : g_last
      state_t last;
      qarma_tweak_upd #(.INVERSE(1'b1)) u_tw (.t_in(tw_i), .t_out(tw_o));
      qarma_bwd_round #(.SHORT(1'b1), .USE_LUT(USE_LUT)) u_rnd (
        .is_in(st_i), .tk(ks_i.k_bwd), .tweak(tw_o), .rc('0),
        .fault(f), .is_out(last), .err(err_o));
      assign st_o = last ^ ks_i.w_out;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) v_q[s] <= 1'b0;
      else        v_q[s] <= v_i;
      st_q[s]  <= st_o;
      tw_q[s]  <= tw_o;
      ks_q[s]  <= ks_i;
      err_q[s] <= (err_i | err_o) & ED_EN;
    end
  end

  assign out_valid = v_q[NS-1];
  assign out_data  = st_q[NS-1];
  assign out_err   = err_q[NS-1];
endmodule
