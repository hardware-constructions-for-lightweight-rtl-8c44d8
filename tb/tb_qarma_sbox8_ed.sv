// tb_qarma_sbox8_ed: tests the protected 8-bit S-box in both constructions
// (gates and table). Fault-free, all 256 inputs must give sigma on each
// nibble with every flag low. Then every input meets random single and
// multiple stuck-at faults; the expected output and flags are worked out
// from the sigma table: with gates the fault hits the input, with the
// table it hits the output read, and each scheme's flag must rise exactly
// when its signature of the faulty output differs from that of the
// correct one.
module tb_qarma_sbox8_ed;
  localparam logic [3:0] SIGMA [16] = '{4'hA, 4'hD, 4'hE, 4'h6, 4'hF, 4'h7, 4'h3, 4'h5,
                                        4'h9, 4'h8, 4'h0, 4'hC, 4'hB, 4'h1, 4'h2, 4'h4};
  logic [7:0] x, sa0, sa1, y_g, y_l;
  logic [1:0] par_g, ilv_g, crc_g, par_l, ilv_l, crc_l;
  int checks = 0, failures = 0, hits = 0;

  qarma_sbox8_ed #(.USE_LUT(1'b0)) dut_g (.x(x), .sa0(sa0), .sa1(sa1), .y(y_g),
                                          .ef_par(par_g), .ef_ilv(ilv_g), .ef_crc(crc_g));
  qarma_sbox8_ed #(.USE_LUT(1'b1)) dut_l (.x(x), .sa0(sa0), .sa1(sa1), .y(y_l),
                                          .ef_par(par_l), .ef_ilv(ilv_l), .ef_crc(crc_l));

  function automatic logic [7:0] s8(logic [7:0] v);
    return {SIGMA[v[7:4]], SIGMA[v[3:0]]};
  endfunction
  function automatic logic [5:0] sigs(logic [3:0] v);   // {crc3, ilv, par}
    return {v[2], v[1] ^ v[3], v[0] ^ v[3], v[1] ^ v[3], v[0] ^ v[2], ^v};
  endfunction

  task automatic expect_flags(string tag, logic [7:0] y_ok, logic [7:0] y_bad, logic [7:0] y,
                              logic [1:0] p, logic [1:0] i, logic [1:0] c);
    logic [1:0] ep, ei, ec;
    for (int n = 0; n < 2; n++) begin
      logic [5:0] a = sigs(y_bad[4*n +: 4]), b = sigs(y_ok[4*n +: 4]);
      ep[n] = a[0] != b[0];
      ei[n] = a[2:1] != b[2:1];
      ec[n] = a[5:3] != b[5:3];
    end
    checks++;
    if (y != y_bad || p != ep || i != ei || c != ec) begin
      failures++;
      $display("FAIL %s x=%h sa0=%h sa1=%h y=%h exp %h flags %b%b%b exp %b%b%b",
               tag, x, sa0, sa1, y, y_bad, p, i, c, ep, ei, ec);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa0 = '0; sa1 = '0;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      expect_flags("gate", s8(x), s8(x), y_g, par_g, ilv_g, crc_g);
      expect_flags("lut",  s8(x), s8(x), y_l, par_l, ilv_l, crc_l);
    end
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 8; k++) begin
        x   = 8'(v);
        sa1 = 8'($urandom) & 8'($urandom);
        sa0 = 8'($urandom) & 8'($urandom) & ~sa1;
        if (k == 0) begin sa1 = 8'(1 << (v % 8)); sa0 = '0; end
        #1;
        expect_flags("gate", s8(x), s8((x & ~sa0) | sa1), y_g, par_g, ilv_g, crc_g);
        expect_flags("lut",  s8(x), (s8(x) & ~sa0) | sa1, y_l, par_l, ilv_l, crc_l);
        hits += int'(|par_g) + int'(|ilv_g) + int'(|crc_g);
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no fault flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
