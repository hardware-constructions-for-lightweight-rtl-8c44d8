// tb_qarma_sbox4_lut: exhaustive test of the table-based S-box: the stored
// output must be sigma and the stored check bits must be the parity,
// interleaved and CRC-3 (mod x^3 + x + 1) signatures of that output.
module tb_qarma_sbox4_lut;
  localparam logic [3:0] SIGMA [16] = '{4'hA, 4'hD, 4'hE, 4'h6, 4'hF, 4'h7, 4'h3, 4'h5,
                                        4'h9, 4'h8, 4'h0, 4'hC, 4'hB, 4'h1, 4'h2, 4'h4};
  logic [3:0] mu, nu, v;
  logic [5:0] sig, exp;
  int checks = 0, failures = 0;
  qarma_sbox4_lut dut (.mu(mu), .nu(nu), .sig(sig));

  // remainder of v(x) modulo x^3 + x + 1, by long division
  function automatic logic [2:0] crc3(logic [3:0] val);
    logic [3:0] r = val;
    if (r[3]) r = r ^ 4'b1011;
    return r[2:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      mu = 4'(x);
      #1;
      v = SIGMA[x];
      exp = {crc3(v), v[1] ^ v[3], v[0] ^ v[2], ^v};
      checks++; if (nu != v)    begin failures++; $display("FAIL nu x=%h", x); end
      checks++; if (sig != exp) begin failures++; $display("FAIL sig x=%h %b exp %b", x, sig, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
