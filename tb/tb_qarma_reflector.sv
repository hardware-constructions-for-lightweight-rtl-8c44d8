// tb_qarma_reflector: the pseudo-reflector against the reference
// (tau, Q, +k1, tau^-1); the same block keyed with Q.k1 must undo it;
// single-bit faults on Q and on the key addition must be flagged.
module tb_qarma_reflector;
  import qarma_pkg::*;
  import qarma_ref_pkg::*;
  state_t    is_in, k1, k1q, o, back;
  fault_t    fault;
  ed_flags_t err, err2;
  int checks = 0, failures = 0, hits = 0;
  qarma_reflector dut  (.is_in(is_in), .k1(k1),  .fault(fault), .is_out(o),    .err(err));
  qarma_reflector dut2 (.is_in(o),     .k1(k1q), .fault('0),    .is_out(back), .err(err2));

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
    state_t r;
    for (int n = 0; n < 300; n++) begin
      is_in = {$urandom, $urandom, $urandom, $urandom};
      k1    = {$urandom, $urandom, $urandom, $urandom};
      k1q   = mix(k1);
      fault = '0;
      r = shuf_inv(mix(shuf(is_in)) ^ k1);
      #1;
      check(o == r, "reflector");
      check(back == is_in, "inverse with Q.k1");
      check(err == '0 && err2 == '0, "flags without fault");
      fault.en       = 1'b1;
      fault.site     = (n % 2) ? SITE_MC : SITE_ARK;
      fault.cell_idx = 4'($urandom_range(0, 15));
      fault.sa1      = 8'(1 << $urandom_range(0, 7));
      #1;
      check((fault.site == SITE_MC ? err.mc : err.ark) == (o != r), "fault flag");
      hits += (o != r);
    end
    check(hits > 0, "faults seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
