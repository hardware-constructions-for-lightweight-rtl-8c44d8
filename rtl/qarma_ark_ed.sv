// qarma_ark_ed: AddRoundTweakey of QARMA-128 with parity prediction.
//
// The state is XORed with the round key, the tweak and the round constant.
// XOR is linear, so the parity of each 8-bit output cell is predicted as
// the XOR of the parities of the four operand cells; err flags any cell
// whose actual parity differs. fault_en/fault_cell/sa0/sa1 force bits of
// one output cell (test hook). Purely combinational.
module qarma_ark_ed
  import qarma_pkg::*;
(
  input  state_t      is_in,
  input  state_t      key,
  input  state_t      tweak,
  input  state_t      rc,
  input  logic        fault_en,
  input  logic [3:0]  fault_cell,
  input  cell_t       sa0,
  input  cell_t       sa1,
  output state_t      is_out,
  output logic        err
);
  logic [15:0] cell_err;

  always_comb begin
    is_out = is_in ^ key ^ tweak ^ rc;
    if (fault_en)
      is_out[127 - 8*fault_cell -: 8] = (is_out[127 - 8*fault_cell -: 8] & ~sa0) | sa1;
    for (int unsigned i = 0; i < 16; i++)
      cell_err[i] = (^get_cell(is_in, i) ^ ^get_cell(key, i) ^ ^get_cell(tweak, i) ^
                     ^get_cell(rc, i)) != ^get_cell(is_out, i);
  end

  assign err = |cell_err;
endmodule
