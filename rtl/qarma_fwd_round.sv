// qarma_fwd_round: one forward round F of QARMA-128 with error detection.
//
// The state is XORed with round key, tweak and round constant
// (AddRoundTweakey), its cells are shuffled by tau = [0,11,6,13,10,1,12,7,
// 5,14,3,8,15,4,9,2], each column is multiplied by M8 (MixColumns) and
// every cell goes through the 8-bit S-box (SubCells). SHORT = 1 gives the
// first round of the cipher, which keeps only AddRoundTweakey and SubCells.
// Every operation carries its own check and err reports one flag per
// scheme. fault.en selects this round for the injected fault and
// fault.site picks the operation it hits (test hook). Combinational.
module qarma_fwd_round
  import qarma_pkg::*;
#(
  parameter bit SHORT   = 1'b0,
  parameter bit USE_LUT = 1'b0
) (
  input  state_t    is_in,
  input  state_t    tk,
  input  state_t    tweak,
  input  state_t    rc,
  input  fault_t    fault,
  output state_t    is_out,
  output ed_flags_t err
);
  state_t     a, b;
  logic       e_ark, e_mc;
  logic [3:0] e_sb;

  qarma_ark_ed u_ark (
    .is_in(is_in), .key(tk), .tweak(tweak), .rc(rc),
    .fault_en(fault.en && fault.site == SITE_ARK), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(a), .err(e_ark));

  if (SHORT) begin : g_short
    assign b    = a;
    assign e_mc = 1'b0;
  end else begin : g_full
    qarma_mixcol_ed u_mc (
      .is_in(permute(a, TAU)),
      .fault_en(fault.en && fault.site == SITE_MC), .fault_cell(fault.cell_idx),
      .sa0(fault.sa0), .sa1(fault.sa1), .is_out(b), .err(e_mc));
  end

  qarma_subcells #(.USE_LUT(USE_LUT)) u_sc (
    .is_in(b), .fault_en(fault.en && fault.site == SITE_SBOX), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(is_out), .err(e_sb));

  assign err = '{par: e_sb[3], ilv: e_sb[2], crc: e_sb[1], rec: e_sb[0], mc: e_mc, ark: e_ark};
endmodule
