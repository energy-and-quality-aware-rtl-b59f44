// tb_hoc_sad_unit: random blocks through the SAD unit, both modes, 4x4 to 16x16,
// some back to back. The expected SAD is the sum over all pixel pairs of
// min(|B>>s - A>>s|, 16) (s = 1 inter, 2 intra); sad_px must be that sum in
// pixel units. Also checks the 3-cycle latency from the last group to sad_valid
// and that clipping and both modes were exercised.
module tb_hoc_sad_unit;
  import emq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  sad_mode_e mode = SAD_INTER;
  logic [3:0][7:0] a, b;
  logic [12:0] sad;
  logic [15:0] sad_px;
  logic sad_valid;
  logic [2:0] clip_count;
  int checks = 0, failures = 0;
  int n_inter = 0, n_intra = 0, n_clip = 0, cyc = 0;
  int exp_q[$];
  int exp_mode_q[$];
  int last_cyc_q[$];

  hoc_sad_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(posedge clk) begin
    if (rst_n && sad_valid) begin
      int e, m, lc;
      e  = exp_q.pop_front();
      m  = exp_mode_q.pop_front();
      lc = last_cyc_q.pop_front();
      checks++;
      if (int'(sad) != e) begin
        failures++;
        $display("SAD mismatch: got %0d expected %0d", sad, e);
      end
      checks++;
      if (int'(sad_px) != e * ((m == 0) ? 2 : 4)) begin
        failures++;
        $display("sad_px mismatch: got %0d", sad_px);
      end
      checks++;
      if (cyc - lc != 3) begin
        failures++;
        $display("latency %0d, expected 3", cyc - lc);
      end
    end
    if (rst_n && clip_count != 0) n_clip++;
  end

  task automatic run_block(int groups, int m, int spread, bit gap);
    int e = 0;
    for (int g = 0; g < groups; g++) begin
      @(negedge clk);
      mode     = (m == 0) ? SAD_INTER : SAD_INTRA;
      in_valid = 1;
      in_first = (g == 0);
      in_last  = (g == groups - 1);
      for (int l = 0; l < 4; l++) begin
        int pa, pb, d, sh;
        pa = $urandom_range(255);
        pb = pa + int'($urandom_range(2 * spread)) - spread;
        if (pb < 0) pb = 0;
        if (pb > 255) pb = 255;
        a[l] = 8'(pa); b[l] = 8'(pb);
        sh = (m == 0) ? 1 : 2;
        d  = (pb >> sh) - (pa >> sh);
        if (d < 0) d = -d;
        e += (d < 16) ? d : 16;
      end
      if (g == groups - 1) begin
        exp_q.push_back(e);
        exp_mode_q.push_back(m);
        last_cyc_q.push_back(cyc + 1);
      end
      if (gap && g % 5 == 3) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int m, groups;
      m = t % 2;
      groups = (t % 4 == 0) ? 4 : ((t % 4 == 1) ? 16 : 64);
      run_block(groups, m, (t % 3 == 0) ? 255 : 40, t % 5 == 2);
      if (m == 0) n_inter++; else n_intra++;
    end
    // worst case 16x16 block: every AD clipped, R2 must not overflow
    begin
      int e;
      e = 0;
      for (int g = 0; g < 64; g++) begin
        @(negedge clk);
        mode = SAD_INTER; in_valid = 1; in_first = (g == 0); in_last = (g == 63);
        for (int l = 0; l < 4; l++) begin a[l] = 8'd0; b[l] = 8'd255; end
        e += 4 * 16;
        if (g == 63) begin exp_q.push_back(e); exp_mode_q.push_back(0); last_cyc_q.push_back(cyc + 1); end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing results: %0d", exp_q.size()); end
    checks++;
    if (n_clip == 0 || n_inter == 0 || n_intra == 0) failures++;
    $display("blocks inter=%0d intra=%0d clip-groups=%0d", n_inter, n_intra, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
