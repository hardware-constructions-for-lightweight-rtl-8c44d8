// tb_qarma_keysched: encryption and decryption key words against values
// worked out independently: the orthomorphism on hand cases and random
// keys, alpha on the core key, the reflector key Q.k0 through the
// reference MixColumns.
module tb_qarma_keysched;
  import qarma_pkg::*;
  import qarma_ref_pkg::mix;
  logic [255:0] key;
  logic         decrypt;
  keys_t        ks;
  int checks = 0, failures = 0;
  qarma_keysched dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic state_t ortho(state_t w);  // (w >>> 1) ^ (w >> 127)
    state_t r = w >> 1;
    r[127] = w[0];
    r[0]   = r[0] ^ w[127];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = {128'h1, 128'h0}; decrypt = 0;
    #1;
    check(ks.w_out == {1'b1, 127'h0}, "o(1)");
    key = {1'b1, 127'h0, 128'h0};
    #1;
    check(ks.w_out == {2'b01, 125'h0, 1'b1}, "o(msb)");
    for (int n = 0; n < 200; n++) begin
      automatic state_t w0 = {$urandom, $urandom, $urandom, $urandom};
      automatic state_t k0 = {$urandom, $urandom, $urandom, $urandom};
      key = {w0, k0}; decrypt = 0;
      #1;
      check(ks.w_in == w0 && ks.w_out == ortho(w0), "enc whitening");
      check(ks.k_fwd == k0 && ks.k_bwd == (k0 ^ ALPHA) && ks.k_ref == k0, "enc core keys");
      decrypt = 1;
      #1;
      check(ks.w_in == ortho(w0) && ks.w_out == w0, "dec whitening");
      check(ks.k_fwd == (k0 ^ ALPHA) && ks.k_bwd == k0 && ks.k_ref == mix(k0), "dec core keys");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
