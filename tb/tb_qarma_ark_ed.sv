// tb_qarma_ark_ed: the four-way XOR against its reference and the
// cell-parity check: quiet without fault, set for every single-bit
// stuck-at that changes the output, quiet for a double-bit error in one
// cell (the known blind spot of parity).
module tb_qarma_ark_ed;
  logic [127:0] is_in, key, tweak, rc, is_out, ref_o;
  logic         fault_en, err;
  logic [3:0]   fault_cell;
  logic [7:0]   sa0, sa1;
  int checks = 0, failures = 0, hits = 0;
  qarma_ark_ed dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      is_in = {$urandom, $urandom, $urandom, $urandom};
      key   = {$urandom, $urandom, $urandom, $urandom};
      tweak = {$urandom, $urandom, $urandom, $urandom};
      rc    = {$urandom, $urandom, $urandom, $urandom};
      ref_o = is_in ^ key ^ tweak ^ rc;
      fault_en = 0; fault_cell = 0; sa0 = 0; sa1 = 0;
      #1;
      check(is_out == ref_o, "xor");
      check(!err, "false alarm");
      fault_en   = 1;
      fault_cell = 4'($urandom_range(0, 15));
      if ($urandom_range(0, 1)) sa1[$urandom_range(0, 7)] = 1'b1;
      else                      sa0[$urandom_range(0, 7)] = 1'b1;
      #1;
      check(err == (is_out != ref_o), "single-bit fault flag");
      hits += err;
      // force two bits of one cell to their complements
      sa0 = '0; sa1 = '0;
      for (int b = 0; b < 2; b++)
        if (ref_o[127 - 8*fault_cell - b]) sa0[7 - b] = 1'b1; else sa1[7 - b] = 1'b1;
      #1;
      check(is_out != ref_o && !err, "double-bit error passes parity");
    end
    check(hits > 0, "faults seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
