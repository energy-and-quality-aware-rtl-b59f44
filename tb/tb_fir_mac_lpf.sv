// tb_fir_mac_lpf: 9-tap MAC filter with a 3x3 Gaussian kernel (sigma = 1,
// taps 19 32 19 / 32 52 32 / 19 32 19, sum 256) and with random kernels.
// Reference per output window: sum of (h & mask)(x & mask) plus, when enabled,
// floor(((2^L-1) sum h + (256 - 2^L) sum h[L-1:0]) / 2). Checks the one-cycle
// output latency, that the compensation makes the average error against the
// full-precision result small (|mean| < 1/4 of the uncompensated mean) for
// L = 4, and the example value: 15 sample LSBs (3840) for the Gaussian at L = 4.
module tb_fir_mac_lpf;
  logic clk = 0, rst_n = 0;
  logic [7:0] h [9];
  logic [3:0] trunc_l;
  logic comp_en;
  logic in_valid = 0;
  logic [7:0] x;
  logic y_valid;
  logic [20:0] y, corr;
  int checks = 0, failures = 0, cyc = 0;
  int gauss [9] = '{19, 32, 19, 32, 52, 32, 19, 32, 19};

  fir_mac_lpf #(.N(9), .M(7)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one window, return the filter output and the full-precision value
  task automatic window(int L, bit comp, output longint got, output longint full);
    int mask, xs [9], exp_y, sh, shl, last;
    longint c;
    mask = 255 & ~((1 << L) - 1);
    exp_y = 0; full = 0; sh = 0; shl = 0;
    for (int k = 0; k < 9; k++) begin
      xs[k] = $urandom_range(255);
      exp_y += (xs[k] & mask) * (int'(h[k]) & mask);
      full  += xs[k] * int'(h[k]);
      sh    += int'(h[k]);
      shl   += int'(h[k]) & ((1 << L) - 1);
    end
    c = (longint'((1 << L) - 1) * sh + longint'(256 - (1 << L)) * shl) / 2;
    if (comp) exp_y += int'(c);
    trunc_l = 4'(L); comp_en = comp;
    for (int k = 0; k < 9; k++) begin
      @(negedge clk);
      in_valid = 1; x = 8'(xs[k]);
      last = cyc + 1;
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!y_valid || cyc != last) begin failures++; $display("y_valid timing"); end
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("L=%0d comp=%0d y=%0d expected %0d", L, comp, y, exp_y);
    end
    got = longint'(y);
  endtask

  initial begin
    longint g, f;
    real err_comp, err_nocomp;
    trunc_l = 0; comp_en = 0; x = 0;
    for (int k = 0; k < 9; k++) h[k] = 8'(gauss[k]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // example value of the estimator
    trunc_l = 4; #1;
    checks++;
    if (corr != 21'd3840) begin failures++; $display("Gaussian L=4 estimator %0d", corr); end
    // bias with and without compensation, Gaussian kernel, L = 4
    err_comp = 0; err_nocomp = 0;
    for (int n = 0; n < 300; n++) begin
      window(4, 1, g, f); err_comp   += real'(g - f);
      window(4, 0, g, f); err_nocomp += real'(g - f);
    end
    err_comp /= 300.0; err_nocomp /= 300.0;
    $display("mean error: compensated %f, uncompensated %f (1/256 LSB)", err_comp, err_nocomp);
    checks++;
    if ((err_comp < 0 ? -err_comp : err_comp) > 0.25 * (err_nocomp < 0 ? -err_nocomp : err_nocomp))
      failures++;
    // random kernels, all truncation levels
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 9; k++) h[k] = 8'($urandom_range(255));
      window(n % 8, n % 3 != 0, g, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
