// tb_qarma128_variants: the single-scheme configurations of the cipher
// (one-bit signature, interleaved signature, CRC-3, recomputation) and the
// table-based S-box build, run side by side with the full configuration
// on the same blocks and injected faults. Every variant must produce the
// reference ciphertext or plaintext; a variant's enabled flag must equal
// the full configuration's flag for that scheme and its disabled flags
// must stay low. The round count is reduced to keep the build small.
module tb_qarma128_variants;
  import qarma_pkg::*;
  import qarma_ref_pkg::*;

  localparam int R   = 2;     // reduced: six pipelines are built side by side
  localparam int LAT = 2*R + 2;
  localparam int NV  = 5;
  localparam ed_flags_t MASK [NV] = '{
    '{par: 1, ilv: 0, crc: 0, rec: 0, mc: 0, ark: 0},
    '{par: 0, ilv: 1, crc: 0, rec: 0, mc: 0, ark: 0},
    '{par: 0, ilv: 0, crc: 1, rec: 0, mc: 0, ark: 0},
    '{par: 0, ilv: 0, crc: 0, rec: 1, mc: 0, ark: 0},
    '1};

  logic         clk = 1'b0;
  logic         rst_n, in_valid, in_decrypt;
  state_t       in_data, in_tweak;
  logic [255:0] in_key;
  fault_t       fault;
  logic         v_full;
  state_t       d_full;
  ed_flags_t    e_full;
  logic         v_var [NV];
  state_t       d_var [NV];
  ed_flags_t    e_var [NV];

  qarma128_ed #(.R(R)) dut_full (.clk, .rst_n, .in_valid, .in_decrypt, .in_data, .in_tweak, .in_key,
                        .fault, .out_valid(v_full), .out_data(d_full), .out_err(e_full));
  for (genvar g = 0; g < NV; g++) begin : g_var
    qarma128_ed #(.R(R), .USE_LUT(g == NV - 1), .ED_EN(MASK[g])) dut (
      .clk, .rst_n, .in_valid, .in_decrypt, .in_data, .in_tweak, .in_key,
      .fault(g == NV - 1 ? fault_t'('0) : fault),
      .out_valid(v_var[g]), .out_data(d_var[g]), .out_err(e_var[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, fired = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_decrypt = 1'b0; in_data = '0; in_tweak = '0; in_key = '0;
    fault = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 120; n++) begin
      automatic logic [255:0] k = {$urandom, $urandom, $urandom, $urandom,
                                   $urandom, $urandom, $urandom, $urandom};
      automatic state_t d = {$urandom, $urandom, $urandom, $urandom};
      automatic state_t t = {$urandom, $urandom, $urandom, $urandom};
      automatic logic dec = 1'($urandom_range(0, 1));
      automatic state_t exp = dec ? decrypt(d, t, k, R) : encrypt(d, t, k, R);
      automatic fault_t f = '0;
      if (n >= 20) begin
        f.en       = 1'b1;
        f.stage    = 5'($urandom_range(0, LAT - 1));
        f.site     = SITE_SBOX;
        f.cell_idx = 4'($urandom_range(0, 15));
        f.sa1      = 8'($urandom) & 8'($urandom);
        f.sa0      = 8'($urandom) & ~f.sa1;
      end
      @(posedge clk);
      fault <= f;
      in_valid <= 1'b1; in_decrypt <= dec; in_data <= d; in_tweak <= t; in_key <= k;
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (LAT - 1) @(posedge clk);
      #1;
      check(v_full, "result after 2R+2 cycles");
      for (int g = 0; g < NV; g++) begin
        check(v_var[g], "variant valid");
        if (g == NV - 1 || !f.en) check(d_var[g] == exp, $sformatf("variant %0d data", g));
        else                      check(d_var[g] == d_full, $sformatf("variant %0d faulty data", g));
        check(e_var[g] == (g == NV - 1 ? ed_flags_t'('0) : (e_full & MASK[g])),
              $sformatf("variant %0d flags %b full %b", g, e_var[g], e_full));
        fired += int'(|e_var[g]);
      end
      if (!f.en) check(d_full == exp && e_full == '0, "clean block");
    end
    check(fired > 0, "variants flagged faults");
    $display("variant flags fired %0d times", fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
