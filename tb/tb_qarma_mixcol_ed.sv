// tb_qarma_mixcol_ed: MixColumns against the reference matrix product,
// involution (M.M = I), unit-vector responses worked out by hand, and the
// column-parity check: quiet without fault, set for every single-bit
// error on an output cell.
module tb_qarma_mixcol_ed;
  import qarma_ref_pkg::*;
  logic [127:0] is_in, is_out, out2;
  logic         fault_en, err, err2;
  logic [3:0]   fault_cell;
  logic [7:0]   sa0, sa1;
  int checks = 0, failures = 0;
  qarma_mixcol_ed dut  (.*);
  qarma_mixcol_ed dut2 (.is_in(is_out), .fault_en(1'b0), .fault_cell(4'd0), .sa0(8'd0), .sa1(8'd0),
                        .is_out(out2), .err(err2));

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
    fault_en = 0; fault_cell = 0; sa0 = 0; sa1 = 0;
    // cell 0 = 0x01: column 0 gets rho^5, rho^4, rho in rows 1, 2, 3
    is_in = {8'h01, 120'h0};
    #1;
    check(is_out == {8'h00, 24'h0, 8'h20, 24'h0, 8'h10, 24'h0, 8'h02, 24'h0}, $sformatf("unit %h", is_out));
    for (int n = 0; n < 300; n++) begin
      is_in = {$urandom, $urandom, $urandom, $urandom};
      fault_en = 0;
      #1;
      check(is_out == mix(is_in), "product");
      check(out2 == is_in, "involution");
      check(!err, "false alarm");
      fault_en   = 1;
      fault_cell = 4'($urandom_range(0, 15));
      sa0 = '0; sa1 = '0;
      if ($urandom_range(0, 1)) sa1[$urandom_range(0, 7)] = 1'b1;
      else                      sa0[$urandom_range(0, 7)] = 1'b1;
      #1;
      check(err == (is_out != mix(is_in)), "single-bit fault flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
