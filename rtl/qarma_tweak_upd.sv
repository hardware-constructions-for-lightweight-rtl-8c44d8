// qarma_tweak_upd: one step of the QARMA-128 tweak schedule.
//
// Forward (INVERSE = 0): the cells are permuted by h, (h(T))_i = t_h(i),
// with h = [6,5,14,15,0,1,2,3,7,12,13,4,8,9,10,11], and then the cells
// 0, 1, 3, 4, 8, 11 and 13 are clocked once through the 8-bit LFSR omega,
// (b7..b0) -> (b0^b2, b7, ..., b1). Backward (INVERSE = 1) undoes that
// step: omega^-1 on the same cells, then h^-1. The permutation h and the
// set of LFSR cells follow the cipher description; the LFSR polynomial is
// the one of the QARMA family, a choice of this design since the
// description leaves it open. Purely combinational.
module qarma_tweak_upd
  import qarma_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t t_in,
  output state_t t_out
);
  function automatic cell_t omega(cell_t b);
    return {b[0] ^ b[2], b[7:1]};
  endfunction

  function automatic cell_t omega_inv(cell_t y);
    return {y[6:0], y[7] ^ y[1]};
  endfunction

  always_comb begin
    state_t t;
    if (!INVERSE) begin
      t = permute(t_in, HP);
      for (int unsigned i = 0; i < 16; i++)
        if (OMEGA_CELLS[i]) t[127 - 8*i -: 8] = omega(get_cell(t, i));
      t_out = t;
    end else begin
      t = t_in;
      for (int unsigned i = 0; i < 16; i++)
        if (OMEGA_CELLS[i]) t[127 - 8*i -: 8] = omega_inv(get_cell(t_in, i));
      t_out = permute_inv(t, HP);
    end
  end
endmodule
