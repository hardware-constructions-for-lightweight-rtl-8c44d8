// qarma_sbox4_lut: table form of the 4-bit S-box sigma that stores the
// predicted signatures next to each output, as suits an FPGA or a
// memory-based implementation.
//
// Each of the 16 words holds {p5, p4, p3, p2, p1, p0, sigma(x)}; the
// signature bits have the same meaning as in qarma_sig_pred. Reading one
// word gives both the output and the check bits, so the signature costs no
// extra logic, only wider words. Purely combinational (asynchronous ROM).
//   mu  : address / S-box input
//   nu  : sigma(mu)
//   sig : {p5, p4, p3, p2, p1, p0}
module qarma_sbox4_lut (
  input  logic [3:0] mu,
  output logic [3:0] nu,
  output logic [5:0] sig
);
  // {p5 p4 p3, p2 p1 p0, sigma}
  localparam logic [9:0] ROM [16] = '{
    10'b001_000_1010, 10'b110_101_1101, 10'b101_011_1110, 10'b110_110_0110,
    10'b100_000_1111, 10'b111_101_0111, 10'b011_110_0011, 10'b101_000_0101,
    10'b010_110_1001, 10'b011_101_1000, 10'b000_000_0000, 10'b111_110_1100,
    10'b000_011_1011, 10'b001_011_0001, 10'b010_101_0010, 10'b100_011_0100
  };

  logic [9:0] word;
  always_comb begin
    word = ROM[mu];
    nu   = word[3:0];
    sig  = word[9:4];
  end
endmodule
