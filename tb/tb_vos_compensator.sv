// tb_vos_compensator: a stream of smooth synthetic JPEG blocks (zig-zag order,
// Q = 50, so the group widths are 9, 8, 7, 6 bits) with injected overscaling
// errors: broken sign-extension bits in groups 3/4 and large spikes in AC
// coefficients. Checks:
//   * every output against a plain software model of the two steps;
//   * each injected sign-extension error is restored to the clean value;
//   * each injected spike is replaced by a value within 8 of the clean one;
//   * clean blocks come out unchanged; out_idx runs 0..63 on 64 consecutive
//     cycles; both steps fired at least once; flush releases the last block.
module tb_vos_compensator;
  logic clk = 0, rst_n = 0;
  logic [6:0] q = 7'd50;
  logic in_valid = 0, in_ready, flush = 0;
  logic signed [13:0] in_coef;
  logic out_valid, out_step1_fix, out_step2_fix;
  logic [5:0] out_idx;
  logic signed [13:0] out_coef;
  int checks = 0, failures = 0;
  localparam int NB = 10;
  int clean [NB][64];
  int dirty [NB][64];
  int model [NB][64];
  bit spike [NB][64];
  bit sext [NB][64];
  int n_s1 = 0, n_s2 = 0, out_blk = 0, out_cnt = 0, last_idx = -1;

  vos_compensator dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap14(int v);
    return int'(signed'(14'(v)));
  endfunction

  function automatic int width_q50(int j);
    return 9 - j / 16;
  endfunction

  function automatic int thr(int j);
    return 64 >> (j / 16);
  endfunction

  function automatic int step1(int v, int j);
    int k, b13, b12, bk, m, r;
    k = width_q50(j);
    if (k > 7) return v;
    b13 = (v >> 13) & 1; b12 = (v >> 12) & 1; bk = (v >> k) & 1;
    m = (b13 + b12 + bk >= 2) ? 1 : 0;
    r = v & ((1 << k) - 1);
    if (m != 0) r = r | (((1 << 14) - 1) & ~((1 << k) - 1));
    return wrap14(r);
  endfunction

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  // software model of the whole stream
  task automatic build_model();
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < 64; j++) model[b][j] = step1(dirty[b][j], j);
    for (int b = 1; b < NB - 1; b++)
      for (int j = 2; j <= 62; j++) begin
        int c, avg_j, ab;
        c  = model[b][j];
        avg_j = (model[b][j-1] + model[b][j+1]) >>> 1;
        ab = (model[b-1][j] + model[b+1][j]) >>> 1;
        if (absi(c - avg_j) > thr(j) && absi(c - ab) > thr(j)) model[b][j] = avg_j;
      end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < 64; j++) begin
        int base;
        if (j == 0)       base = 400;
        else if (j < 16)  base = 120 - 4 * j;
        else if (j < 32)  base = 50 - j;
        else if (j < 48)  base = 20 - j / 4;
        else              base = -3;
        clean[b][j] = base + int'($urandom_range(4)) - 2;
        dirty[b][j] = clean[b][j];
        spike[b][j] = 0; sext[b][j] = 0;
      end
    // injected errors
    dirty[3][20] = clean[3][20] + 300;                spike[3][20] = 1;
    dirty[5][9]  = clean[5][9] - 700;                 spike[5][9]  = 1;
    dirty[6][40] = wrap14(clean[6][40] ^ (1 << 12));  sext[6][40]  = 1;
    dirty[4][50] = wrap14(clean[4][50] ^ (1 << 11));  sext[4][50]  = 1;
    dirty[7][55] = wrap14(clean[7][55] ^ (1 << 6));   sext[7][55]  = 1;
    dirty[2][60] = wrap14(clean[2][60] + 96);         spike[2][60] = 1;
    build_model();

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        while (!in_ready) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_coef = 14'(dirty[b][j]);
      end
      @(negedge clk);
      in_valid = 0;
    end
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (out_blk != NB) begin failures++; $display("blocks out: %0d", out_blk); end
    checks++;
    if (n_s1 == 0 || n_s2 == 0) failures++;
    $display("step1 fixes=%0d step2 fixes=%0d", n_s1, n_s2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int b, j, got;
      b = out_blk; j = int'(out_idx); got = int'(out_coef);
      checks++;
      if (j != out_cnt || (j != 0 && last_idx != j - 1)) begin failures++; $display("index order"); end
      checks++;
      if (got != model[b][j]) begin
        failures++;
        $display("block %0d coef %0d got %0d model %0d", b, j, got, model[b][j]);
      end
      if (sext[b][j]) begin
        checks++;
        if (got != clean[b][j]) begin failures++; $display("sign ext not restored b%0d j%0d", b, j); end
      end else if (spike[b][j]) begin
        checks++;
        if (absi(got - clean[b][j]) > 8) begin failures++; $display("spike not removed b%0d j%0d: %0d", b, j, got); end
      end else begin
        checks++;
        if (got != clean[b][j]) begin failures++; $display("clean value changed b%0d j%0d", b, j); end
      end
      if (out_step1_fix) n_s1++;
      if (out_step2_fix) n_s2++;
      last_idx = j;
      out_cnt++;
      if (out_cnt == 64) begin out_cnt = 0; out_blk++; end
    end
  end
endmodule
