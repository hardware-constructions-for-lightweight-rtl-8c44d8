// qarma_keysched: derives the keys that one QARMA-128 block uses along the
// pipeline from the 256-bit master key w0 || k0.
//
// Encryption: w_in = w0, w_out = w1 = o(w0), forward core key k0, backward
// core key k0 ^ alpha, reflector key k1 = k0. The orthomorphism is
// o(x) = (x >>> 1) ^ (x >> 127). Decryption runs the same datapath with
// the whitening keys swapped, core key k0 ^ alpha (so the backward rounds
// use k0) and reflector key Q.k0; with those keys the datapath computes
// the inverse permutation. Purely combinational.
//   key     : {w0, k0}, w0 in bits 255:128
//   decrypt : 0 encrypt, 1 decrypt
//   ks      : the five round-key words
module qarma_keysched
  import qarma_pkg::*;
(
  input  logic [255:0] key,
  input  logic         decrypt,
  output keys_t        ks
);
  state_t w0, k0, w1;

  assign w0 = key[255:128];
  assign k0 = key[127:0];
  assign w1 = {w0[0], w0[127:1]} ^ (w0 >> 127);

  always_comb begin
    if (!decrypt) begin
      ks.w_in  = w0;
      ks.w_out = w1;
      ks.k_fwd = k0;
      ks.k_bwd = k0 ^ ALPHA;
      ks.k_ref = k0;
    end else begin
      ks.w_in  = w1;
      ks.w_out = w0;
      ks.k_fwd = k0 ^ ALPHA;
      ks.k_bwd = k0;
      ks.k_ref = mix_columns(k0);
    end
  end
endmodule
