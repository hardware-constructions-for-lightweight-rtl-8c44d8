// tb_qarma_subcells: random states through the SubCells layer compared
// with the reference S-box; fault-free flags must be low. Faults on one
// cell's S-box inputs must give the reference output of the faulty cell
// and raise the recomputation flag whenever the output changes.
module tb_qarma_subcells;
  import qarma_ref_pkg::*;
  logic [127:0] is_in, is_out, exp;
  logic         fault_en;
  logic [3:0]   fault_cell, err;
  logic [7:0]   sa0, sa1;
  int checks = 0, failures = 0, rec_hits = 0;
  qarma_subcells dut (.*);

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
    for (int n = 0; n < 300; n++) begin
      is_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(is_out == sub(is_in), $sformatf("sub %h", is_in));
      check(err == 4'b0, "flag without fault");
    end
    for (int n = 0; n < 300; n++) begin
      is_in      = {$urandom, $urandom, $urandom, $urandom};
      fault_en   = 1'b1;
      fault_cell = 4'($urandom_range(0, 15));
      sa1        = 8'(1 << $urandom_range(0, 7));
      sa0        = ~sa1 & 8'($urandom) & 8'($urandom);
      exp        = is_in;
      exp[127 - 8*fault_cell -: 8] = (is_in[127 - 8*fault_cell -: 8] & ~sa0) | sa1;
      #1;
      check(is_out == sub(exp), "faulty output");
      check(err[0] == (is_out != sub(is_in)), "recomputation flag");
      rec_hits += err[0];
    end
    check(rec_hits > 0, "a fault was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
