// qarma_bwd_round: one backward round F' of QARMA-128 with error
// detection, the inverse of qarma_fwd_round.
//
// SubCells (sigma is involutory, so S^-1 = S), MixColumns (M8 is
// involutory), the inverse shuffle tau^-1 and finally AddRoundTweakey.
// SHORT = 1 gives the last round of the cipher: SubCells then
// AddRoundTweakey. err reports one flag per scheme; fault.en selects this
// round for the injected fault (test hook). Combinational.
module qarma_bwd_round
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
  state_t     s, m;
  logic       e_ark, e_mc;
  logic [3:0] e_sb;

  qarma_subcells #(.USE_LUT(USE_LUT)) u_sc (
    .is_in(is_in), .fault_en(fault.en && fault.site == SITE_SBOX), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(s), .err(e_sb));

  if (SHORT) begin : g_short
    assign m    = s;
    assign e_mc = 1'b0;
  end else begin : g_full
    state_t mc;
    qarma_mixcol_ed u_mc (
      .is_in(s),
      .fault_en(fault.en && fault.site == SITE_MC), .fault_cell(fault.cell_idx),
      .sa0(fault.sa0), .sa1(fault.sa1), .is_out(mc), .err(e_mc));
    assign m = permute_inv(mc, TAU);
  end

  qarma_ark_ed u_ark (
    .is_in(m), .key(tk), .tweak(tweak), .rc(rc),
    .fault_en(fault.en && fault.site == SITE_ARK), .fault_cell(fault.cell_idx),
    .sa0(fault.sa0), .sa1(fault.sa1), .is_out(is_out), .err(e_ark));

  assign err = '{par: e_sb[3], ilv: e_sb[2], crc: e_sb[1], rec: e_sb[0], mc: e_mc, ark: e_ark};
endmodule
