// qarma_reflector: the keyed pseudo-reflector at the centre of QARMA-128.
//
// The state is shuffled by tau, multiplied column-wise by Q = M8, XORed
// with the reflector key k1 and shuffled back by tau^-1. Q is involutory,
// so the inverse reflector is the same circuit keyed with Q.k1, which is
// how decryption reuses it. The Q multiplication carries the MixColumns
// column-parity check (err.mc) and the key addition a cell-parity check
// (err.ark); the S-box flags are always 0 here. fault.en selects this
// block for the injected fault (test hook). Combinational.
module qarma_reflector
  import qarma_pkg::*;
(
  input  state_t    is_in,
  input  state_t    k1,
  input  fault_t    fault,
  output state_t    is_out,
  output ed_flags_t err
);
  state_t q, a;
  logic   e_mc, e_ark;

  qarma_mixcol_ed u_q (
    .is_in(permute(is_in, TAU)),
    .fault_en(fault.en && fault.site == SITE_MC), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(q), .err(e_mc));

  qarma_ark_ed u_k1 (
    .is_in(q), .key(k1), .tweak('0), .rc('0),
    .fault_en(fault.en && fault.site == SITE_ARK), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(a), .err(e_ark));

  assign is_out = permute_inv(a, TAU);
  assign err    = '{par: 1'b0, ilv: 1'b0, crc: 1'b0, rec: 1'b0, mc: e_mc, ark: e_ark};
endmodule
