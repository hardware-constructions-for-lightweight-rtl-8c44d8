// tb_qarma_coverage: stuck-at fault campaign on one protected 8-bit S-box,
// in the style of the published error-coverage experiment.
//
// 1. Every single stuck-at fault on each of the 8 output bits (table
//    construction, where faults land on the bits read out), for all 256
//    inputs: the one-bit, interleaved and CRC-3 signatures must catch
//    every fault that changes the output.
// 2. Every single stuck-at fault on each of the 8 input bits (gate
//    construction): the recomputation check must catch every fault that
//    changes the output.
// 3. 50,000 random multiple stuck-at faults (2 to 8 bits, random input
//    value) on the S-box inputs: the coverage of each scheme, i.e. the
//    share of output-changing faults it flags, is printed. Only the
//    recomputation check is required to reach 100 %; the signature
//    coverages depend on the fault model and are reported.
module tb_qarma_coverage;
  logic [7:0] x, sa0, sa1, y_g, y_l, y_ok;
  logic [1:0] par_g, ilv_g, crc_g, par_l, ilv_l, crc_l;
  logic       rec;
  int checks = 0, failures = 0;
  int eff, d_par, d_ilv, d_crc, d_rec;

  qarma_sbox8_ed #(.USE_LUT(1'b0)) dut_g (.x(x), .sa0(sa0), .sa1(sa1), .y(y_g),
                                          .ef_par(par_g), .ef_ilv(ilv_g), .ef_crc(crc_g));
  qarma_sbox8_ed #(.USE_LUT(1'b1)) dut_l (.x(x), .sa0(sa0), .sa1(sa1), .y(y_l),
                                          .ef_par(par_l), .ef_ilv(ilv_l), .ef_crc(crc_l));
  qarma_sbox8_ed #(.USE_LUT(1'b0)) gold  (.x(x), .sa0(8'h00), .sa1(8'h00), .y(y_ok),
                                          .ef_par(), .ef_ilv(), .ef_crc());
  qarma_sbox8_recomp u_rec (.x(x), .y_act(y_g), .err(rec));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. single stuck-at on outputs
    eff = 0; d_par = 0; d_ilv = 0; d_crc = 0;
    for (int i = 0; i < 4096; i++) begin
        x   = 8'(i / 16);
        sa0 = (i % 16 < 8)  ? 8'(1 << (i % 16)) : 8'h00;
        sa1 = (i % 16 >= 8) ? 8'(1 << (i % 16 - 8)) : 8'h00;
        #1;
        if (y_l != y_ok) begin
          eff++;
          d_par += int'(|par_l); d_ilv += int'(|ilv_l); d_crc += int'(|crc_l);
        end
    end
    $display("single stuck-at on outputs: %0d effective, caught par=%0d ilv=%0d crc=%0d", eff, d_par, d_ilv, d_crc);
    check(eff > 0 && d_par == eff && d_ilv == eff && d_crc == eff, "single output faults all caught");

    // 2. single stuck-at on inputs
    eff = 0; d_rec = 0;
    for (int i = 0; i < 4096; i++) begin
        x   = 8'(i / 16);
        sa0 = (i % 16 < 8)  ? 8'(1 << (i % 16)) : 8'h00;
        sa1 = (i % 16 >= 8) ? 8'(1 << (i % 16 - 8)) : 8'h00;
        #1;
        if (y_g != y_ok) begin eff++; d_rec += int'(rec); end
    end
    $display("single stuck-at on inputs: %0d effective, caught rec=%0d", eff, d_rec);
    check(eff > 0 && d_rec == eff, "single input faults all caught by recomputation");

    // 3. random multiple stuck-at on inputs
    eff = 0; d_par = 0; d_ilv = 0; d_crc = 0; d_rec = 0;
    for (int n = 0; n < 50000; n++) begin
      automatic int nb = $urandom_range(2, 8);
      x = 8'($urandom);
      sa0 = '0; sa1 = '0;
      for (int k = 0; k < nb; k++) begin
        automatic int b = $urandom_range(0, 7);
        if ($urandom_range(0, 1)) begin sa1[b] = 1'b1; sa0[b] = 1'b0; end
        else                      begin sa0[b] = 1'b1; sa1[b] = 1'b0; end
      end
      #1;
      if (y_g != y_ok) begin
        eff++;
        d_par += int'(|par_g); d_ilv += int'(|ilv_g); d_crc += int'(|crc_g); d_rec += int'(rec);
        check(!(rec == 1'b0), "multiple fault missed by recomputation");
      end else begin
        check(par_g == 0 && ilv_g == 0 && crc_g == 0 && rec == 0, "flag on unchanged output");
      end
    end
    $display("50000 multiple stuck-at faults: %0d effective; coverage par=%0.2f%% ilv=%0.2f%% crc=%0.2f%% rec=%0.2f%%",
             eff, 100.0 * d_par / eff, 100.0 * d_ilv / eff, 100.0 * d_crc / eff, 100.0 * d_rec / eff);
    check(d_crc >= d_par, "CRC-3 covers at least what the one-bit signature covers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
