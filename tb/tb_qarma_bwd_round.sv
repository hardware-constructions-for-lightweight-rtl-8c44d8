// tb_qarma_bwd_round: the backward round F' (S, M, tau^-1, AddRoundTweakey)
// in its full and short forms against the reference model on random
// states, keys, tweaks and constants, with all flags low; then single-bit
// faults at each site (S-box, MixColumns, tweakey addition) must raise
// that site's flag whenever they change the result. The gate and table
// S-box constructions are both instantiated.
module tb_qarma_bwd_round;
  import qarma_pkg::*;
  import qarma_ref_pkg::*;
  state_t    is_in, tk, tweak, rc, o_full, o_short, o_lut;
  fault_t    fault;
  ed_flags_t e_full, e_short, e_lut;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  qarma_bwd_round #(.SHORT(1'b0), .USE_LUT(1'b0)) dut_full (
    .is_in, .tk, .tweak, .rc, .fault, .is_out(o_full), .err(e_full));
  qarma_bwd_round #(.SHORT(1'b1), .USE_LUT(1'b0)) dut_short (
    .is_in, .tk, .tweak, .rc, .fault, .is_out(o_short), .err(e_short));
  qarma_bwd_round #(.SHORT(1'b0), .USE_LUT(1'b1)) dut_lut (
    .is_in, .tk, .tweak, .rc, .fault('0), .is_out(o_lut), .err(e_lut));

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
    state_t r_full, r_short;
    for (int n = 0; n < 300; n++) begin
      is_in = {$urandom, $urandom, $urandom, $urandom};
      tk    = {$urandom, $urandom, $urandom, $urandom};
      tweak = {$urandom, $urandom, $urandom, $urandom};
      rc    = (n % 2) ? {$urandom, $urandom, $urandom, $urandom} : '0;
      fault = '0;
      r_full  = bwd(is_in, tk ^ tweak ^ rc);
      r_short = sub(is_in) ^ tk ^ tweak ^ rc;
      #1;
      check(o_full == r_full, "full round");
      check(o_short == r_short, "short round");
      check(o_lut == r_full, "table S-box round");
      check(e_full == '0 && e_short == '0 && e_lut == '0, "flags without fault");
      fault.en       = 1'b1;
      fault.site     = fault_site_e'(n % 3);
      fault.cell_idx = 4'($urandom_range(0, 15));
      fault.sa0 = '0; fault.sa1 = '0;
      if ($urandom_range(0, 1)) fault.sa1[$urandom_range(0, 7)] = 1'b1;
      else                      fault.sa0[$urandom_range(0, 7)] = 1'b1;
      #1;
      case (fault.site)
        SITE_SBOX: begin
          check(e_full.rec == (o_full != r_full), "S-box fault, recomputation flag");
          check(!(e_full.par | e_full.ilv | e_full.crc) || o_full != r_full, "S-box signature flag only on a changed result");
          if (o_full != r_full) seen[0]++;
        end
        SITE_MC: begin
          check(e_full.mc == (o_full != r_full), "MixColumns fault flag");
          check(o_short == r_short, "short round has no MixColumns");
          if (o_full != r_full) seen[1]++;
        end
        default: begin
          check(e_full.ark == (o_full != r_full), "tweakey fault flag");
          check(e_short.ark == (o_short != r_short), "tweakey fault flag, short");
          if (o_full != r_full) seen[2]++;
        end
      endcase
    end
    check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0, "faults at every site");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
