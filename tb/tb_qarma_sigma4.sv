// tb_qarma_sigma4: exhaustive test of the gate-level 4-bit S-box against
// the sigma table; also checks that sigma is an involution.
module tb_qarma_sigma4;
  localparam logic [3:0] SIGMA [16] = '{4'hA, 4'hD, 4'hE, 4'h6, 4'hF, 4'h7, 4'h3, 4'h5,
                                        4'h9, 4'h8, 4'h0, 4'hC, 4'hB, 4'h1, 4'h2, 4'h4};
  logic [3:0] mu, nu, mu2, nu2;
  int checks = 0, failures = 0;
  qarma_sigma4 dut  (.mu(mu),  .nu(nu));
  qarma_sigma4 dut2 (.mu(mu2), .nu(nu2));
  assign mu2 = nu;

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
      checks++; if (nu != SIGMA[x]) begin failures++; $display("FAIL sigma(%h)=%h", x, nu); end
      checks++; if (nu2 != 4'(x))   begin failures++; $display("FAIL not involutory at %h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
