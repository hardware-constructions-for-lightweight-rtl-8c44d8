// tb_qarma_sbox8_recomp: for every input the checker must stay quiet when
// given the correct 8-bit S-box output and must flag every corrupted one
// (random non-zero error patterns, all single-bit errors).
module tb_qarma_sbox8_recomp;
  localparam logic [3:0] SIGMA [16] = '{4'hA, 4'hD, 4'hE, 4'h6, 4'hF, 4'h7, 4'h3, 4'h5,
                                        4'h9, 4'h8, 4'h0, 4'hC, 4'hB, 4'h1, 4'h2, 4'h4};
  logic [7:0] x, y_act, ok;
  logic       err;
  int checks = 0, failures = 0;
  qarma_sbox8_recomp dut (.x(x), .y_act(y_act), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x  = 8'(v);
      ok = {SIGMA[x[7:4]], SIGMA[x[3:0]]};
      y_act = ok;
      #1;
      checks++; if (err) begin failures++; $display("FAIL false alarm x=%h", x); end
      for (int b = 0; b < 9; b++) begin
        logic [7:0] e = (b < 8) ? 8'(1 << b) : 8'($urandom_range(1, 255));
        y_act = ok ^ e;
        #1;
        checks++; if (!err) begin failures++; $display("FAIL missed x=%h e=%h", x, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
