// qarma_sbox8_ed: one 8-bit S-box of QARMA-128 with signature-based
// concurrent error detection.
//
// The 8-bit S-box is two 4-bit sigma instances side by side, one per
// nibble. For each nibble the check bits of the output are predicted from
// the input and compared with the same bits computed from the actual
// output ("actual signature"). Three schemes run in parallel and each
// raises its own pair of flags, bit 0 for the low nibble and bit 1 for
// the high nibble:
//   ef_par : one-bit signature (output parity)        - odd-weight errors
//   ef_ilv : interleaved signature (nu0^nu2, nu1^nu3) - burst errors
//   ef_crc : CRC-3 remainder modulo x^3 + x + 1
// USE_LUT selects the construction: 0 builds sigma and the predictor from
// logic gates, 1 reads output and stored signatures from one table word.
//
// Fault injection (a test hook of this design, not part of the cipher):
// sa0 forces bits to 0 and sa1 forces bits to 1. With gates the masks act
// on the sigma inputs while the predictor still sees the clean input; with
// the table they act on the output bits read from it. Tie both to zero in
// normal use. Purely combinational.
module qarma_sbox8_ed #(
  parameter bit USE_LUT = 1'b0
) (
  input  logic [7:0] x,
  input  logic [7:0] sa0,
  input  logic [7:0] sa1,
  output logic [7:0] y,
  output logic [1:0] ef_par,
  output logic [1:0] ef_ilv,
  output logic [1:0] ef_crc
);
  logic [7:0] xf;            // S-box input after fault injection
  logic [3:0] nu   [2];      // outputs of the two sigma instances
  logic [5:0] pred [2];      // predicted signatures

  assign xf = USE_LUT ? x : ((x & ~sa0) | sa1);

  for (genvar n = 0; n < 2; n++) begin : g_nib
    if (USE_LUT) begin : g_lut
      logic [3:0] nu_raw;
      qarma_sbox4_lut u_lut (.mu(x[4*n +: 4]), .nu(nu_raw), .sig(pred[n]));
      assign nu[n] = (nu_raw & ~sa0[4*n +: 4]) | sa1[4*n +: 4];
    end else begin : g_gate
      qarma_sigma4   u_sbox (.mu(xf[4*n +: 4]), .nu(nu[n]));
      qarma_sig_pred u_pred (.mu(x[4*n +: 4]),  .sig(pred[n]));
    end

    // Actual signatures from the S-box output.
    logic       act_par;
    logic [1:0] act_ilv;
    logic [2:0] act_crc;
    always_comb begin
      act_par = ^nu[n];
      act_ilv = {nu[n][1] ^ nu[n][3], nu[n][0] ^ nu[n][2]};
      act_crc = {nu[n][2], nu[n][1] ^ nu[n][3], nu[n][0] ^ nu[n][3]};
    end
    assign ef_par[n] = act_par != pred[n][0];
    assign ef_ilv[n] = act_ilv != pred[n][2:1];
    assign ef_crc[n] = act_crc != pred[n][5:3];
    assign y[4*n +: 4] = nu[n];
  end
endmodule
