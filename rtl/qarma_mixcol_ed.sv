// qarma_mixcol_ed: MixColumns of QARMA-128 with a column-parity check.
//
// Each column of the 4x4 cell array is multiplied by the involutory matrix
// M8 = circ(0, rho, rho^4, rho^5), where rho^i rotates a cell left by i
// bits; the same matrix serves as Q in the pseudo-reflector. Rotation
// keeps a cell's parity and every input cell feeds exactly three outputs
// of its column, so the parity of each output column equals the parity of
// the input column. That prediction costs one XOR tree per column and is
// compared with the actual output; err is the OR over the four columns.
// fault_en/fault_cell/sa0/sa1 force bits of one output cell (test hook).
// Purely combinational.
module qarma_mixcol_ed
  import qarma_pkg::*;
(
  input  state_t      is_in,
  input  logic        fault_en,
  input  logic [3:0]  fault_cell,
  input  cell_t       sa0,
  input  cell_t       sa1,
  output state_t      is_out,
  output logic        err
);
  state_t     mixed;
  logic [3:0] col_err;

  always_comb begin
    mixed  = mix_columns(is_in);
    is_out = mixed;
    if (fault_en)
      is_out[127 - 8*fault_cell -: 8] = (mixed[127 - 8*fault_cell -: 8] & ~sa0) | sa1;
    for (int unsigned c = 0; c < 4; c++) begin
      logic p_in, p_out;
      p_in  = 1'b0;
      p_out = 1'b0;
      for (int unsigned r = 0; r < 4; r++) begin
        p_in  ^= ^get_cell(is_in,  4*r + c);
        p_out ^= ^get_cell(is_out, 4*r + c);
      end
      col_err[c] = p_in != p_out;
    end
  end

  assign err = |col_err;
endmodule
