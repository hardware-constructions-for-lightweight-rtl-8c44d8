// tb_qarma_tweak_upd: the forward tweak step against the reference
// (h, then the LFSR on cells 0,1,3,4,8,11,13), a hand-worked case, and
// the inverse step undoing the forward one.
module tb_qarma_tweak_upd;
  import qarma_ref_pkg::*;
  logic [127:0] t_in, t_fwd, t_back;
  int checks = 0, failures = 0;
  qarma_tweak_upd #(.INVERSE(1'b0)) dut_f (.t_in(t_in),  .t_out(t_fwd));
  qarma_tweak_upd #(.INVERSE(1'b1)) dut_b (.t_in(t_fwd), .t_out(t_back));

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
    // cell 6 = 0x05 moves to cell 0 (h[0] = 6) and is clocked once:
    // 0000_0101 -> b0^b2 = 0, shifted right: 0000_0010
    t_in = '0; t_in[127 - 8*6 -: 8] = 8'h05;
    #1;
    check(t_fwd == {8'h02, 120'h0}, $sformatf("hand case %h", t_fwd));
    // cell 7 = 0x01 moves to cell 8 (h[8] = 7): 0000_0001 -> 1000_0000
    t_in = '0; t_in[127 - 8*7 -: 8] = 8'h01;
    #1;
    check(t_fwd == {64'h0, 8'h80, 56'h0}, $sformatf("hand case 2 %h", t_fwd));
    for (int n = 0; n < 500; n++) begin
      t_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(t_fwd == tweak_next(t_in), "forward step");
      check(t_back == t_in, "inverse step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
