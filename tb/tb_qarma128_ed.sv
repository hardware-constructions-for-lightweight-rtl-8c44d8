// tb_qarma128_ed: end-to-end test of the QARMA-128 error-detecting
// pipeline at its default parameters.
//
// Phase 1 streams blocks back to back (one per clock, gaps at random) with
// random keys, tweaks and directions and compares every result with the
// behavioural reference model, including the exact 2R+2 cycle latency and
// clean error flags. Phase 2 feeds each ciphertext back in decryption mode
// and expects the plaintext. Phase 3 injects single and multiple stuck-at
// faults into S-boxes, MixColumns, the reflector and tweakey additions of
// random stages and checks that every corrupted result is flagged by the
// scheme that watches that operation. The run counts how often each
// mechanism fired and fails if one never did.
module tb_qarma128_ed;
  import qarma_pkg::*;
  import qarma_ref_pkg::*;

  localparam int R   = 11;          // the design's default
  localparam int LAT = 2*R + 2;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_decrypt;
  state_t       in_data, in_tweak;
  logic [255:0] in_key;
  fault_t       fault;
  logic         out_valid;
  state_t       out_data;
  ed_flags_t    out_err;

  qarma128_ed dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_enc = 0, cnt_dec = 0, cnt_b2b = 0, cnt_gap = 0;
  int cnt_par = 0, cnt_ilv = 0, cnt_crc = 0, cnt_rec = 0, cnt_mc = 0, cnt_ark = 0, cnt_refl = 0;
  longint cycle = 0;
  bit fault_phase = 1'b0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic state_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // scoreboard
  typedef struct { state_t exp; longint t_in; state_t pt; state_t tw; logic [255:0] key; } sb_t;
  sb_t q[$];
  state_t ct_pt[$], ct_ct[$], ct_tw[$];
  logic [255:0] ct_key[$];

  always @(posedge clk) begin
    if (rst_n && out_valid && !fault_phase) begin
      if (q.size() == 0) check(0, "output without input");
      else begin
        automatic sb_t e = q.pop_front();
        check(out_data == e.exp, $sformatf("data %h exp %h", out_data, e.exp));
        check(cycle - e.t_in == LAT, $sformatf("latency %0d", cycle - e.t_in));
        check(out_err == '0, "error flag without fault");
      end
    end
  end

  task automatic send(logic dec, state_t d, state_t t, logic [255:0] k, state_t exp);
    in_valid   <= 1'b1;
    in_decrypt <= dec;
    in_data    <= d;
    in_tweak   <= t;
    in_key     <= k;
    q.push_back('{exp: exp, t_in: cycle + 1, pt: d, tw: t, key: k});
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_decrypt = 1'b0;
    in_data = '0; in_tweak = '0; in_key = '0; fault = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Phase 1: random stream
    for (int n = 0; n < 200; n++) begin
      automatic logic [255:0] k = rnd256();
      automatic state_t d = rnd128(), t = rnd128();
      automatic logic dec = $urandom_range(0, 3) == 0;
      if (n < 8) k = (n == 0) ? '0 : k;
      if (dec) begin cnt_dec++; send(1'b1, d, t, k, decrypt(d, t, k, R)); end
      else begin
        automatic state_t c = encrypt(d, t, k, R);
        cnt_enc++;
        ct_pt.push_back(d); ct_ct.push_back(c); ct_tw.push_back(t); ct_key.push_back(k);
        send(1'b0, d, t, k, c);
      end
      if ($urandom_range(0, 4) == 0) begin cnt_gap++; idle(); end
      else cnt_b2b++;
    end
    idle();
    repeat (LAT + 2) @(posedge clk);
    check(q.size() == 0, "phase 1 drained");

    // Phase 2: decrypt what was encrypted
    while (ct_ct.size() > 0) begin
      automatic state_t c = ct_ct.pop_front(), p = ct_pt.pop_front(), t = ct_tw.pop_front();
      automatic logic [255:0] k = ct_key.pop_front();
      send(1'b1, c, t, k, p);
    end
    idle();
    repeat (LAT + 2) @(posedge clk);
    check(q.size() == 0, "phase 2 drained");

    // Phase 3: fault injection, one block at a time. A single stuck-at bit
    // flips at most one bit, which every parity-based check must see; with
    // several bits only the recomputation check is bound to see a change.
    fault_phase = 1'b1;
    for (int n = 0; n < 600; n++) begin
      automatic logic [255:0] k = rnd256();
      automatic state_t d = rnd128(), t = rnd128();
      automatic logic dec = 1'($urandom_range(0, 1));
      automatic state_t exp;
      automatic fault_t f;
      automatic int nb;
      f.en       = 1'b1;
      f.stage    = 5'($urandom_range(0, LAT - 1));
      f.site     = fault_site_e'($urandom_range(0, 2));
      f.cell_idx = 4'($urandom_range(0, 15));
      nb         = (n % 3 == 0) ? 1 : $urandom_range(1, 8);
      f.sa0 = '0; f.sa1 = '0;
      for (int b = 0; b < nb; b++) begin
        automatic int bit_i = $urandom_range(0, 7);
        if ($urandom_range(0, 1)) f.sa1[bit_i] = 1'b1; else f.sa0[bit_i] = 1'b1;
      end
      f.sa0 &= ~f.sa1;
      // sites that do not exist in a short round fall back to the S-box
      if ((f.stage == 0 || f.stage == LAT - 1) && f.site == SITE_MC) f.site = SITE_SBOX;
      exp = dec ? decrypt(d, t, k, R) : encrypt(d, t, k, R);
      fault <= f;
      in_valid <= 1'b1; in_decrypt <= dec; in_data <= d; in_tweak <= t; in_key <= k;
      @(posedge clk);
      in_valid <= 1'b0;
      while (!out_valid) @(posedge clk);
      #1;
      if (out_data != exp) begin
        case (f.site)
          SITE_SBOX: check(out_err.rec, "S-box fault not caught by recomputation");
          SITE_MC:   if (nb == 1) check(out_err.mc,  "MixColumns fault not caught");
          default:   if (nb == 1) check(out_err.ark, "tweakey-addition fault not caught");
        endcase
        if (f.site == SITE_MC && f.stage == R + 1) cnt_refl++;
      end else begin
        check(out_err.par == 1'b0 && out_err.ilv == 1'b0 && out_err.crc == 1'b0 && out_err.rec == 1'b0,
              "S-box flag on unchanged result");
      end
      cnt_par += out_err.par; cnt_ilv += out_err.ilv; cnt_crc += out_err.crc;
      cnt_rec += out_err.rec; cnt_mc += out_err.mc; cnt_ark += out_err.ark;
      @(posedge clk);
    end
    fault <= '0;

    $display("encryptions=%0d decryptions=%0d back_to_back=%0d gaps=%0d", cnt_enc, cnt_dec, cnt_b2b, cnt_gap);
    $display("flags: par=%0d ilv=%0d crc=%0d rec=%0d mc=%0d ark=%0d reflector_faults=%0d",
             cnt_par, cnt_ilv, cnt_crc, cnt_rec, cnt_mc, cnt_ark, cnt_refl);
    check(cnt_enc > 0 && cnt_dec > 0, "both directions used");
    check(cnt_b2b > 0 && cnt_gap > 0, "streaming with and without gaps");
    check(cnt_par > 0, "one-bit signature fired");
    check(cnt_ilv > 0, "interleaved signature fired");
    check(cnt_crc > 0, "CRC-3 fired");
    check(cnt_rec > 0, "recomputation fired");
    check(cnt_mc > 0,  "MixColumns check fired");
    check(cnt_ark > 0, "tweakey check fired");
    check(cnt_refl > 0, "reflector fault seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
