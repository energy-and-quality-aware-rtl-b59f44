// tb_emq_top: end-to-end test of the whole design at its default parameters
// (3x3 FIR, 32x32 code blocks of 16-bit coefficients). Each datapath is taken
// through a complete operation and its result is compared with values worked
// out here:
//   SAD      a 16x16 block in inter mode and one in intra mode (four pixels per
//            cycle); R2 must equal the sum of clipped, truncated differences.
//   DCT      a flat 8x8 block at level 0 (DC = 32 * (pixel - 128), all AC 0) and
//            a random block at the level chosen for Q = 25, scheme II (level 4:
//            4-bit truncation, W7 and W6 off, so those outputs must be zero
//            apart from the compensation constants).
//   VOS      three coefficient blocks and a flush; block 1 carries a broken
//            sign-extension bit and an outlier, both must be repaired.
//   FIR      a 3x3 Gaussian window with 4-bit truncation, with and without
//            compensation; the compensated result must be closer to the exact sum.
//   ECC      each code: one flipped bit corrected, two flipped bits detected.
//   BPC      a code block with an edge and isolated wrong ones (Methods 3 and
//            4 restore it), a burst (only Method 4 removes it), Method 1 and a
//            low-band block that bypasses the corrector.
// Every mechanism is counted; a count of zero is a failure.
module tb_emq_top;
  import emq_pkg::*;
  localparam int FIR_N = 9, BS = 32, BW = 16, NP = BS * BS;
  localparam int ACCW = 2 * 8 + $clog2(FIR_N) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // SAD
  logic sad_in_valid = 0, sad_in_first = 0, sad_in_last = 0;
  sad_mode_e sad_mode = SAD_INTER;
  logic [SAD_LANES-1:0][PIX_W-1:0] sad_a = '0, sad_b = '0;
  logic [R2_W-1:0] sad_r2;
  logic [15:0] sad_px;
  logic sad_valid;
  logic [2:0] sad_clip_count;
  // DCT
  logic [6:0] dct_q = 7'd75;
  psnr_scheme_e dct_scheme = SCHEME_II;
  logic dct_override_en = 0;
  logic [3:0] dct_level_override = 0, dct_level;
  logic dct_in_valid = 0, dct_in_ready, dct_out_valid;
  logic [7:0] dct_in_row [8];
  logic [2:0] dct_out_col;
  logic signed [DCT_W-1:0] dct_out_coef [8];
  // VOS
  logic [6:0] vos_q = 7'd25;
  logic vos_in_valid = 0, vos_in_ready, vos_flush = 0, vos_out_valid;
  logic signed [DCT_W-1:0] vos_in_coef = '0, vos_out_coef;
  logic [5:0] vos_out_idx;
  logic vos_out_step1_fix, vos_out_step2_fix;
  // FIR
  logic [7:0] fir_h [FIR_N];
  logic [3:0] fir_trunc_l = 0;
  logic fir_comp_en = 0, fir_in_valid = 0, fir_y_valid;
  logic [7:0] fir_x = 0;
  logic [ACCW-1:0] fir_y, fir_corr;
  // ECC
  ecc_code_e enc_code = ECC_39_32, dec_code = ECC_39_32;
  logic [127:0] enc_data = '0, dec_data = '0, dec_data_out;
  logic [8:0] enc_parity, dec_parity = '0;
  logic dec_corrected, dec_uncorrectable;
  // BPC
  bpc_method_e bpc_method = BPC_METHOD3;
  logic bpc_high_band = 1, bpc_in_valid = 0, bpc_in_ready, bpc_out_valid, bpc_busy;
  logic [2:0] bpc_n_erase = 0;
  logic [8:0] bpc_thr = 0;
  logic [BW-1:0] bpc_in_coef = '0, bpc_out_coef;
  logic [4:0] bpc_planes_done;
  logic [15:0] bpc_bits_cleared;

  emq_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_inter = 0, n_intra = 0, n_clip = 0;
  int n_trunc = 0, n_deact = 0, n_comp = 0;
  int n_step1 = 0, n_step2 = 0;
  int n_fir_comp = 0;
  int n_ecc_corr = 0, n_ecc_det = 0;
  int n_m1 = 0, n_m2 = 0, n_m3 = 0, n_m4 = 0, n_burst = 0, n_bypass = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- SAD
  task automatic run_sad(sad_mode_e m);
    int exp_sum, sh, clips;
    logic [7:0] a [256], b [256];
    sh = (m == SAD_INTER) ? 1 : 2;
    exp_sum = 0; clips = 0;
    for (int i = 0; i < 256; i++) begin
      int d;
      a[i] = 8'($urandom);
      b[i] = ($urandom_range(3) == 0) ? 8'($urandom) : 8'(int'(a[i]) ^ $urandom_range(7));
      d = (int'(a[i]) >> sh) - (int'(b[i]) >> sh);
      if (d < 0) d = -d;
      if (d >= 16) begin d = 16; clips++; end
      exp_sum += d;
    end
    @(negedge clk);
    for (int g = 0; g < 64; g++) begin
      sad_mode = m; sad_in_valid = 1; sad_in_first = (g == 0); sad_in_last = (g == 63);
      for (int l = 0; l < 4; l++) begin sad_a[l] = a[4 * g + l]; sad_b[l] = b[4 * g + l]; end
      @(negedge clk);
    end
    sad_in_valid = 0; sad_in_first = 0; sad_in_last = 0;
    while (!sad_valid) @(negedge clk);
    check(int'(sad_r2) == exp_sum, $sformatf("SAD mode %0d: %0d expected %0d", m, sad_r2, exp_sum));
    check(int'(sad_px) == exp_sum << sh, "SAD in pixel units");
    if (m == SAD_INTER) n_inter++; else n_intra++;
    n_clip += clips;
  endtask

  int sad_clip_seen = 0;
  always @(posedge clk) if (sad_clip_count != 0) sad_clip_seen++;

  // ---------------------------------------------------------------- DCT
  logic signed [DCT_W-1:0] dct_res [8][8];   // [column u][output k]
  task automatic run_dct(logic [7:0] blk [8][8]);
    int got;
    @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      while (!dct_in_ready) @(negedge clk);
      dct_in_valid = 1; dct_in_row = blk[r];
      @(negedge clk);
    end
    dct_in_valid = 0;
    got = 0;
    while (got < 8) begin
      @(posedge clk); #1;
      if (dct_out_valid) begin
        dct_res[dct_out_col] = dct_out_coef;
        got++;
      end
    end
  endtask

  // ---------------------------------------------------------------- VOS
  int vos_idx_seen [64];
  task automatic run_vos();
    logic signed [DCT_W-1:0] blk [3][64];
    for (int b = 0; b < 3; b++)
      for (int j = 0; j < 64; j++) blk[b][j] = (j == 0) ? DCT_W'(200) : DCT_W'(2);
    blk[1][20] = DCT_W'(3) ^ (DCT_W'(1) << 13);   // broken sign-extension bit
    blk[1][40] = DCT_W'(60);                      // outlier
    @(negedge clk);
    for (int b = 0; b < 3; b++) begin
      for (int j = 0; j < 64; j++) begin
        while (!vos_in_ready) begin vos_in_valid = 0; @(negedge clk); end
        vos_in_valid = 1; vos_in_coef = blk[b][j];
        @(negedge clk);
      end
      vos_in_valid = 0;
    end
    while (!vos_in_ready) @(negedge clk);
    vos_flush = 1; @(negedge clk); vos_flush = 0;
    repeat (200) @(negedge clk);
  endtask

  int vos_blk = 0;
  always @(posedge clk) begin
    if (rst_n && vos_out_valid) begin
      if (vos_out_step1_fix) n_step1++;
      if (vos_out_step2_fix) n_step2++;
      if (vos_blk == 1 && vos_out_idx == 6'd20) begin
        checks++;
        if (vos_out_coef != DCT_W'(3)) begin failures++; $display("FAIL: VOS step 1 result %0d", vos_out_coef); end
      end
      if (vos_blk == 1 && vos_out_idx == 6'd40) begin
        checks++;
        if (vos_out_coef > DCT_W'(4) || vos_out_coef < DCT_W'(0)) begin
          failures++; $display("FAIL: VOS step 2 result %0d", vos_out_coef);
        end
      end
      if (vos_out_idx == 6'd63) vos_blk++;
    end
  end

  // ---------------------------------------------------------------- FIR
  task automatic run_fir(logic [7:0] x [FIR_N], int l, bit comp, output int y);
    @(negedge clk);
    fir_trunc_l = 4'(l); fir_comp_en = comp;
    for (int i = 0; i < FIR_N; i++) begin
      fir_in_valid = 1; fir_x = x[i];
      @(negedge clk);
    end
    fir_in_valid = 0;
    while (!fir_y_valid) @(negedge clk);
    y = int'(fir_y);
  endtask

  // ---------------------------------------------------------------- BPC
  logic [BW-1:0] bclean [NP], bblk [NP], bgot [NP];
  task automatic run_bpc(bpc_method_e m, bit hb, int ne, int th);
    int n;
    @(negedge clk);
    bpc_method = m; bpc_high_band = hb; bpc_n_erase = 3'(ne); bpc_thr = 9'(th);
    for (int i = 0; i < NP; i++) begin
      while (!bpc_in_ready) begin bpc_in_valid = 0; @(negedge clk); end
      bpc_in_valid = 1; bpc_in_coef = bblk[i];
      @(negedge clk);
    end
    bpc_in_valid = 0;
    n = 0;
    while (n < NP) begin
      @(posedge clk); #1;
      if (bpc_out_valid) begin bgot[n] = bpc_out_coef; n++; end
    end
  endtask

  function automatic int bpc_diff_clean();
    int bad;
    bad = 0;
    for (int i = 0; i < NP; i++) if (bgot[i] !== bclean[i]) bad++;
    return bad;
  endfunction

  // ---------------------------------------------------------------- main
  initial begin
    for (int i = 0; i < FIR_N; i++) fir_h[i] = 8'd0;
    for (int i = 0; i < 8; i++) dct_in_row[i] = 8'd0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // SAD, both modes
    run_sad(SAD_INTER);
    run_sad(SAD_INTRA);
    check(sad_clip_seen > 0, "SAD clip count never reported");

    // DCT: flat block at level 0
    begin
      logic [7:0] blk [8][8];
      int dc_exp;
      dct_override_en = 1; dct_level_override = 4'd0;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blk[r][c] = 8'd178;
      dc_exp = 32 * (178 - 128);
      run_dct(blk);
      check((int'(dct_res[0][0]) - dc_exp) <= 4 && (dc_exp - int'(dct_res[0][0])) <= 4,
            $sformatf("flat-block DC %0d expected %0d", dct_res[0][0], dc_exp));
      for (int u = 0; u < 8; u++) for (int k = 0; k < 8; k++)
        if (u != 0 || k != 0)
          check(int'(dct_res[u][k]) <= 2 && int'(dct_res[u][k]) >= -2, "flat-block AC not zero");
      // random block, level chosen from Q = 25, scheme II
      dct_override_en = 0; dct_q = 7'd25; dct_scheme = SCHEME_II;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blk[r][c] = 8'($urandom);
      #1;
      check(dct_level == 4'd4, $sformatf("level for Q=25 scheme II is %0d", dct_level));
      run_dct(blk);
      if (dut.dct_cfg.trunc != TRUNC_0) n_trunc++;
      if (dut.dct_cfg.deact != 8'd0) n_deact++;
      if (dut.dct_cfg.comp_en) n_comp++;
      for (int u = 0; u < 8; u++) begin
        check(dct_res[u][7] == 0 && dct_res[u][6] == 0, "deactivated row outputs not zero");
        // a column switched off in the row pass feeds zeros to the column pass;
        // only the compensation constants of outputs 0 and 1 remain
        if (u >= 6) for (int k = 2; k < 8; k++) check(dct_res[u][k] == 0, "deactivated column not zero");
      end
    end

    // VOS
    run_vos();

    // FIR: 3x3 Gaussian, 4-bit truncation, compensated vs uncompensated
    begin
      int h3 [9];
      logic [7:0] x [FIR_N];
      longint err_u, err_c;
      h3 = '{19, 32, 19, 32, 52, 32, 19, 32, 19};
      err_u = 0; err_c = 0;
      for (int i = 0; i < FIR_N; i++) fir_h[i] = 8'(h3[i]);
      for (int t = 0; t < 40; t++) begin
        int exact, yu, yc;
        exact = 0;
        for (int i = 0; i < FIR_N; i++) begin x[i] = 8'($urandom); exact += h3[i] * int'(x[i]); end
        run_fir(x, 4, 1'b0, yu);
        run_fir(x, 4, 1'b1, yc);
        err_u += longint'(yu) - longint'(exact);
        err_c += longint'(yc) - longint'(exact);
        if (yc != yu) n_fir_comp++;
        if (t == 0) check(int'(fir_corr) == 3840, $sformatf("FIR correction %0d expected 3840", fir_corr));
      end
      check((err_c < 0 ? -err_c : err_c) < (err_u < 0 ? -err_u : err_u),
            $sformatf("FIR compensation does not reduce the mean error (%0d vs %0d)", err_c, err_u));
    end

    // ECC: every code, one and two flipped bits
    for (int c = 0; c < 3; c++) begin
      for (int t = 0; t < 20; t++) begin
        int k, p1, p2;
        logic [127:0] d;
        k = (c == 0) ? 32 : (c == 1) ? 64 : 128;
        d = {$urandom, $urandom, $urandom, $urandom};
        if (k < 128) d = d & ((128'd1 << k) - 1);
        enc_code = ecc_code_e'(c); dec_code = ecc_code_e'(c); enc_data = d;
        #1;
        p1 = $urandom_range(k - 1);
        p2 = (p1 + 1 + $urandom_range(k - 2)) % k;
        dec_data = d; dec_data[p1] = ~dec_data[p1]; dec_parity = enc_parity;
        #1;
        check(dec_corrected && !dec_uncorrectable && dec_data_out == d, "ECC single error");
        if (dec_corrected) n_ecc_corr++;
        dec_data[p2] = ~dec_data[p2];
        #1;
        check(dec_uncorrectable && !dec_corrected, "ECC double error");
        if (dec_uncorrectable) n_ecc_det++;
      end
    end

    // BPC: clean block with a vertical edge in planes 12/11 and dense low planes
    for (int i = 0; i < NP; i++) begin
      logic [BW-1:0] v;
      v = BW'($urandom_range(255));
      if (i % BS == 16) v = v | 16'h1800;
      v[BW-1] = 1'($urandom_range(1));
      bclean[i] = v;
    end
    for (int i = 0; i < NP; i++) bblk[i] = bclean[i];
    bblk[2 * BS + 3][14]  = 1'b1;
    bblk[10 * BS + 27][13] = 1'b1;
    bblk[20 * BS + 5][12] = 1'b1;
    bblk[30 * BS + 30][14] = 1'b1;
    run_bpc(BPC_METHOD3, 1'b1, 0, 64);
    check(bpc_diff_clean() == 0, "Method 3 did not restore the block");
    check(bpc_bits_cleared == 16'd4, $sformatf("Method 3 cleared %0d bits", bpc_bits_cleared));
    if (bpc_diff_clean() == 0) n_m3++;
    run_bpc(BPC_METHOD4, 1'b1, 0, 64);
    check(bpc_diff_clean() == 0, "Method 4 did not restore the block");
    if (bpc_diff_clean() == 0) n_m4++;
    run_bpc(BPC_METHOD2, 1'b1, 0, 64);
    check(bpc_planes_done == 5'd7, $sformatf("Method 2 planes %0d", bpc_planes_done));
    for (int i = 0; i < NP; i++) check(bgot[i][13:8] == 0 && bgot[i][14] == 0, "Method 2 left a high bit");
    n_m2++;
    run_bpc(BPC_METHOD1, 1'b1, 2, 0);
    for (int i = 0; i < NP; i++) check(bgot[i][14:13] == 0 && bgot[i][12:0] == bblk[i][12:0], "Method 1");
    if (bpc_planes_done == 5'd2) n_m1++;
    // burst of two adjacent wrong ones in plane 13
    for (int i = 0; i < NP; i++) bblk[i] = bclean[i];
    bblk[5 * BS + 8][13] = 1'b1;
    bblk[5 * BS + 9][13] = 1'b1;
    run_bpc(BPC_METHOD3, 1'b1, 0, 64);
    check(bpc_diff_clean() == 2, "Method 3 should keep the burst");
    run_bpc(BPC_METHOD4, 1'b1, 0, 64);
    check(bpc_diff_clean() == 0, "Method 4 did not remove the burst");
    if (bpc_diff_clean() == 0) n_burst++;
    // low band: bypass
    run_bpc(BPC_METHOD4, 1'b0, 0, 64);
    check(bpc_diff_clean() == 2 && bpc_planes_done == 0, "low band must pass unchanged");
    n_bypass++;

    // mechanisms
    $display("SAD inter=%0d intra=%0d clipped ADs=%0d", n_inter, n_intra, n_clip);
    $display("DCT truncation=%0d deactivation=%0d compensation=%0d", n_trunc, n_deact, n_comp);
    $display("VOS step1=%0d step2=%0d", n_step1, n_step2);
    $display("FIR compensated outputs=%0d", n_fir_comp);
    $display("ECC corrected=%0d detected=%0d", n_ecc_corr, n_ecc_det);
    $display("BPC m1=%0d m2=%0d m3=%0d m4=%0d burst=%0d bypass=%0d", n_m1, n_m2, n_m3, n_m4, n_burst, n_bypass);
    check(n_inter > 0, "inter SAD never ran");
    check(n_intra > 0, "intra SAD never ran");
    check(n_clip > 0, "no AD was clipped");
    check(n_trunc > 0, "DCT truncation never used");
    check(n_deact > 0, "DCT deactivation never used");
    check(n_comp > 0, "DCT compensation never used");
    check(n_step1 > 0, "VOS step 1 never fired");
    check(n_step2 > 0, "VOS step 2 never fired");
    check(n_fir_comp > 0, "FIR compensation never changed an output");
    check(n_ecc_corr > 0, "ECC never corrected");
    check(n_ecc_det > 0, "ECC never detected");
    check(n_m1 > 0 && n_m2 > 0 && n_m3 > 0 && n_m4 > 0, "a bit-plane method never worked");
    check(n_burst > 0, "burst never removed");
    check(n_bypass > 0, "bypass never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
