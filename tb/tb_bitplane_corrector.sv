// tb_bitplane_corrector: runs the corrector on an 8x8 block (S = 8, W = 16, so
// magnitude planes 14..0) and compares every output word with a behavioural
// model of the four methods written here. Directed cases:
//   - high_band = 0 passes the block through untouched;
//   - a vertical edge in planes 12/11 plus isolated wrong ones in planes 12..14:
//     Methods 3 and 4 must return the clean block exactly, Method 2 must lose
//     the edge (it clears whole planes);
//   - a two-bit horizontal burst in plane 13: Method 3 keeps it (the two bits
//     support each other), Method 4 removes it;
//   - Method 1 with n_erase = 2 clears planes 14 and 13.
// Then random blocks with random methods and thresholds against the model.
module tb_bitplane_corrector;
  import emq_pkg::*;
  localparam int S = 8, W = 16, NP = S * S, TOP = W - 2;

  logic clk = 0, rst_n = 0;
  bpc_method_e method;
  logic high_band;
  logic [2:0] n_erase;
  logic [8:0] thr;
  logic in_valid = 0, in_ready, out_valid, busy;
  logic [W-1:0] in_coef, out_coef;
  logic [4:0] planes_done;
  logic [15:0] bits_cleared;

  int checks = 0, failures = 0;
  logic [W-1:0] clean [NP];
  logic [W-1:0] blk   [NP];
  logic [W-1:0] refm  [NP];
  logic [W-1:0] got   [NP];
  int ref_pd, ref_bc;

  bitplane_corrector #(.S(S), .W(W), .CNT_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic rbit(int r, int c, int pl);
    if (r < 0 || r >= S || c < 0 || c >= S || pl < 0 || pl > TOP) return 1'b0;
    return refm[r * S + c][pl];
  endfunction

  // behavioural model of the corrector working on refm
  task automatic run_model(int meth, bit hb, int ne, int th);
    ref_pd = 0; ref_bc = 0;
    if (!hb) return;
    if (meth == 0) begin
      for (int k = 0; k < ne && TOP - k >= 0; k++) begin
        for (int i = 0; i < NP; i++) if (refm[i][TOP - k]) begin
          refm[i][TOP - k] = 1'b0; ref_bc++;
        end
        ref_pd++;
      end
      return;
    end
    for (int pl = TOP; pl >= 0; pl--) begin
      int ones;
      bit clr [NP];
      ones = 0;
      for (int i = 0; i < NP; i++) ones += int'(refm[i][pl]);
      if (ones > 511) ones = 511;
      if (ones >= th) break;
      for (int i = 0; i < NP; i++) begin
        int r, c;
        bit sup;
        r = i / S; c = i % S;
        sup = 0;
        if (meth != 1) begin
          for (int dp = -2; dp <= 1; dp++)
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++) begin
                bit skip;
                skip = (dp == 0 && dr == 0 && dc == 0) ||
                       (meth == 3 && dp == 0 && (dr == 0 || dc == 0));
                if (!skip && rbit(r + dr, c + dc, pl + dp)) sup = 1;
              end
        end
        clr[i] = refm[i][pl] && !sup;
      end
      for (int i = 0; i < NP; i++) if (clr[i]) begin
        refm[i][pl] = 1'b0; ref_bc++;
      end
      ref_pd++;
    end
  endtask

  // load blk, collect the block into got
  task automatic run_dut(int meth, bit hb, int ne, int th);
    int n, cyc;
    method = bpc_method_e'(meth); high_band = hb; n_erase = 3'(ne); thr = 9'(th);
    for (int i = 0; i < NP; i++) begin
      in_valid <= 1'b1; in_coef <= blk[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    n = 0; cyc = 0;
    while (n < NP && cyc < 100000) begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin got[n] = out_coef; n++; end
    end
    checks++;
    if (n != NP) begin failures++; $display("block output incomplete"); end
  endtask

  task automatic compare(string what, int meth, bit hb, int ne, int th);
    int bad;
    for (int i = 0; i < NP; i++) refm[i] = blk[i];
    run_model(meth, hb, ne, th);
    run_dut(meth, hb, ne, th);
    bad = 0;
    for (int i = 0; i < NP; i++) if (got[i] !== refm[i]) bad++;
    checks += 3;
    if (bad != 0) begin failures++; $display("%s: %0d words differ from model", what, bad); end
    if (int'(planes_done) != ref_pd) begin
      failures++; $display("%s: planes_done %0d expected %0d", what, planes_done, ref_pd);
    end
    if (int'(bits_cleared) != ref_bc) begin
      failures++; $display("%s: bits_cleared %0d expected %0d", what, bits_cleared, ref_bc);
    end
  endtask

  function automatic int same_as_clean();
    int bad;
    bad = 0;
    for (int i = 0; i < NP; i++) if (got[i] !== clean[i]) bad++;
    return bad;
  endfunction

  initial begin
    int bad;
    method = BPC_METHOD1; high_band = 0; n_erase = 0; thr = 0; in_coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // clean block: vertical edge in column 4 (planes 12 and 11), dense small
    // values in planes 0..7
    for (int i = 0; i < NP; i++) begin
      logic [W-1:0] v;
      v = W'($urandom_range(255));
      if (i % S == 4) v = v | 16'h1800;
      if ($urandom_range(1) == 1) v[W-1] = 1'b1;
      clean[i] = v;
    end
    // isolated wrong ones away from the edge and from each other
    for (int i = 0; i < NP; i++) blk[i] = clean[i];
    blk[0 * S + 0][14] = 1'b1;
    blk[3 * S + 1][13] = 1'b1;
    blk[6 * S + 7][12] = 1'b1;
    blk[1 * S + 7][14] = 1'b1;

    compare("bypass", 2, 1'b0, 0, 16);
    bad = 0;
    for (int i = 0; i < NP; i++) if (got[i] !== blk[i]) bad++;
    checks++; if (bad != 0) failures++;

    compare("method3 edge", 2, 1'b1, 0, 16);
    checks++;
    if (same_as_clean() != 0) begin failures++; $display("method3 did not restore the clean block"); end
    compare("method4 edge", 3, 1'b1, 0, 16);
    checks++;
    if (same_as_clean() != 0) begin failures++; $display("method4 did not restore the clean block"); end
    compare("method2 edge", 1, 1'b1, 0, 16);
    checks++;
    if (bits_cleared < 16) begin failures++; $display("method2 kept the edge"); end
    compare("method1", 0, 1'b1, 2, 0);
    checks++;
    for (int i = 0; i < NP; i++) if (got[i][14] || got[i][13]) bad++;
    if (bad != 0) failures++;

    // two-bit horizontal burst in plane 13
    for (int i = 0; i < NP; i++) blk[i] = clean[i];
    blk[1 * S + 0][13] = 1'b1;
    blk[1 * S + 1][13] = 1'b1;
    compare("method3 burst", 2, 1'b1, 0, 16);
    checks++;
    if (!(got[1 * S + 0][13] && got[1 * S + 1][13])) begin
      failures++; $display("method3 should keep a self-supporting burst");
    end
    compare("method4 burst", 3, 1'b1, 0, 16);
    checks++;
    if (same_as_clean() != 0) begin failures++; $display("method4 did not remove the burst"); end

    // random blocks
    for (int t = 0; t < 60; t++) begin
      int meth, th, ne;
      meth = t % 4;
      th = $urandom_range(1, 24);
      ne = $urandom_range(0, 7);
      for (int i = 0; i < NP; i++) begin
        logic [W-1:0] v;
        v = W'($urandom_range(1023));
        if ($urandom_range(9) == 0) v = v | W'($urandom_range(3) << 10);
        if ($urandom_range(15) == 0) v[$urandom_range(14, 10)] = 1'b1;
        v[W-1] = 1'($urandom_range(1));
        blk[i] = v;
      end
      compare($sformatf("random %0d", t), meth, 1'b1, ne, th);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
