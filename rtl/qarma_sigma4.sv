// qarma_sigma4: the 4-bit involutory S-box sigma of QARMA in two-level
// logic-gate form.
//
// sigma = [A, D, E, 6, F, 7, 3, 5, 9, 8, 0, C, B, 1, 2, 4] (hex). Each
// output bit is an OR of AND terms with one XOR, as derived for a
// low-area ASIC construction; the equations reproduce the table for all
// sixteen inputs and sigma(sigma(x)) = x. Purely combinational.
//   mu : input nibble (mu[3] most significant)
//   nu : sigma(mu)
module qarma_sigma4 (
  input  logic [3:0] mu,
  output logic [3:0] nu
);
  always_comb begin
    nu[0] = (mu[2] & (~mu[1] | ~mu[3])) | (~mu[1] & (mu[3] ^ mu[0]));
    nu[1] = (~mu[0] & (~mu[3] | mu[2])) | (~mu[3] & (mu[1] ^ mu[2]));
    nu[2] = (mu[0] & (~mu[3] | mu[1]))  | (~mu[3] & (mu[1] ^ mu[2]));
    nu[3] = (~mu[1] & (~mu[2] | ~mu[0])) | (~mu[2] & (~mu[3] ^ mu[0]));
  end
endmodule
