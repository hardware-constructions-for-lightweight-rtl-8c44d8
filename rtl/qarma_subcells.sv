// qarma_subcells: the SubCells layer of QARMA-128 with error detection.
//
// Sixteen protected 8-bit S-boxes (qarma_sbox8_ed) replace every cell of
// the state with sigma applied to each nibble; each S-box also has a
// nibble-swap recomputation checker (qarma_sbox8_recomp). The flags of
// all cells are ORed per scheme into err = {par, ilv, crc, rec}. sigma is
// involutory, so the same layer serves the forward and backward rounds.
// fault_en/fault_cell/sa0/sa1 inject stuck-at faults into one S-box (test
// hook; tie fault_en low in normal use). Purely combinational.
module qarma_subcells #(
  parameter bit USE_LUT = 1'b0
) (
  input  logic [127:0] is_in,
  input  logic         fault_en,
  input  logic [3:0]   fault_cell,
  input  logic [7:0]   sa0,
  input  logic [7:0]   sa1,
  output logic [127:0] is_out,
  output logic [3:0]   err      // {par, ilv, crc, rec}
);
  logic [15:0] e_par, e_ilv, e_crc, e_rec;

  for (genvar i = 0; i < 16; i++) begin : g_cell
    logic       hit;
    logic [7:0] x, y;
    logic [1:0] fp, fi, fc;
    assign hit = fault_en && (fault_cell == 4'(i));
    assign x   = is_in[127 - 8*i -: 8];
    qarma_sbox8_ed #(.USE_LUT(USE_LUT)) u_sb (
      .x(x), .sa0(hit ? sa0 : 8'h00), .sa1(hit ? sa1 : 8'h00),
      .y(y), .ef_par(fp), .ef_ilv(fi), .ef_crc(fc));
    qarma_sbox8_recomp u_rc (.x(x), .y_act(y), .err(e_rec[i]));
    assign e_par[i] = |fp;
    assign e_ilv[i] = |fi;
    assign e_crc[i] = |fc;
    assign is_out[127 - 8*i -: 8] = y;
  end

  assign err = {|e_par, |e_ilv, |e_crc, |e_rec};
endmodule
