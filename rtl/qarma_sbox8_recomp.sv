// qarma_sbox8_recomp: architecture-oblivious check of one 8-bit S-box by
// recomputing with encoded (nibble-swapped) operands.
//
// The input nibbles are swapped, so the high nibble goes through the
// sigma instance that normally serves the low nibble and the other way
// round; the output nibbles are swapped back and compared with the output
// of the S-box under test. A transient or permanent fault in either sigma
// instance of the checked S-box therefore meets a fault-free instance in
// the recomputation and shows as a mismatch. The check needs no knowledge
// of how sigma is built. Here the second evaluation uses its own pair of
// sigma instances in the same cycle; a time-shared version would reuse the
// S-box under test over two cycles. Purely combinational.
//   x     : S-box input (clean)
//   y_act : output of the S-box under test
//   err   : 1 when the recomputed output differs
module qarma_sbox8_recomp (
  input  logic [7:0] x,
  input  logic [7:0] y_act,
  output logic       err
);
  logic [7:0] x_sw, y_sw;

  assign x_sw = {x[3:0], x[7:4]};
  qarma_sigma4 u_lo (.mu(x_sw[3:0]), .nu(y_sw[3:0]));
  qarma_sigma4 u_hi (.mu(x_sw[7:4]), .nu(y_sw[7:4]));

  assign err = {y_sw[3:0], y_sw[7:4]} != y_act;
endmodule
