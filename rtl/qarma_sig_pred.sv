// qarma_sig_pred: predicts, from the input of the 4-bit S-box sigma, the
// check bits of its output, without computing the output itself.
//
// Three signature schemes share the predictor:
//   sig[0]   p0 : one-bit signature, the parity of all four output bits
//   sig[1]   p1 : interleaved signature nu0 ^ nu2
//   sig[2]   p2 : interleaved signature nu1 ^ nu3
//   sig[3]   p3 : CRC-3 bit x^0, nu0 ^ nu3
//   sig[4]   p4 : CRC-3 bit x^1, nu1 ^ nu3
//   sig[5]   p5 : CRC-3 bit x^2, nu2
// The CRC-3 bits are the remainder of nu(x) = nu3 x^3 + nu2 x^2 + nu1 x + nu0
// modulo g(x) = x^3 + x + 1. Each bit is a sum-of-products in the input
// bits, so a fault inside sigma cannot corrupt the prediction.
// Purely combinational.
module qarma_sig_pred (
  input  logic [3:0] mu,
  output logic [5:0] sig
);
  always_comb begin
    sig[0] = (mu[3] & mu[2]) | (~mu[1] & mu[0]) | (~mu[3] & ~mu[2] & mu[1] & ~mu[0]);
    sig[1] = (~mu[3] & ~mu[2] & mu[1]) | ((mu[3] ^ mu[1]) & ~mu[0]) |
             (mu[3] & mu[1] & mu[0]) | (mu[3] & mu[2] & ~mu[1]);
    sig[2] = (~mu[2] & mu[0]) | (mu[3] & ~mu[2] & ~mu[1]) |
             (~mu[3] & ~mu[1] & mu[0]) | (mu[2] & mu[1] & ~mu[0]);
    sig[3] = (~mu[2] & (mu[3] ^ ~mu[0])) | (mu[2] & ((~mu[3] & mu[1]) | (~mu[1] & mu[0])));
    sig[4] = (~mu[2] & mu[0]) | (~mu[1] & ((mu[3] & ~mu[2]) | (~mu[3] & mu[0]))) |
             (mu[2] & mu[1] & ~mu[0]);
    sig[5] = (mu[0] & (~mu[3] | mu[1])) | (~mu[3] & (mu[2] ^ mu[1]));
  end
endmodule
