// tb_qarma_sig_pred: exhaustive test of the signature predictor against the
// printed signature tables (one-bit, interleaved and CRC-3 rows, x = 0..F).
module tb_qarma_sig_pred;
  // rows written left to right for x = 0..F
  localparam logic [15:0] P0 = 16'b0110_0100_0100_1111;
  localparam logic [15:0] P1 = 16'b0011_0010_1001_1101;
  localparam logic [15:0] P2 = 16'b0101_0110_1101_0010;
  localparam logic [15:0] P3 = 16'b1010_0111_0101_0100;
  localparam logic [15:0] P4 = 16'b0101_0110_1101_0010;
  localparam logic [15:0] P5 = 16'b0111_1101_0001_0001;
  logic [3:0] mu;
  logic [5:0] sig, exp;
  int checks = 0, failures = 0;
  qarma_sig_pred dut (.mu(mu), .sig(sig));

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
      exp = {P5[15-x], P4[15-x], P3[15-x], P2[15-x], P1[15-x], P0[15-x]};
      checks++;
      if (sig != exp) begin failures++; $display("FAIL x=%h sig=%b exp=%b", x, sig, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
