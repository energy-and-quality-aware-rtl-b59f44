// tb_dct1d_trunc: random input vectors and configurations through the 1-D DCT.
// Reference: the plain 8x8 matrix form of the even/odd DCT equations with the
// constants round(4096 * cos(k pi/16) / 2) computed here from $cos, products
// summed exactly and floored to 2 fraction bits, inputs truncated as floor to
// multiples of 2^L, the compensation floor(d(2^L-1)/2) / floor((a+c+e+g)(2^L-1)/8)
// computed in real arithmetic, deactivated outputs 0. Full-precision results
// are also compared with the real-valued DCT (tolerance 8 LSB = 2 units).
module tb_dct1d_trunc;
  import emq_pkg::*;
  logic signed [13:0] x [8];
  logic signed [13:0] w [8];
  dct_cfg_t cfg;
  int checks = 0, failures = 0;
  int n_trunc = 0, n_deact = 0, n_comp = 0;
  real PI = 3.14159265358979;

  dct1d_trunc dut (.x(x), .cfg(cfg), .w(w));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int kcoef(int k);
    return int'($floor(0.5 * $cos(k * PI / 16.0) * 4096.0 + 0.5));
  endfunction

  function automatic int floor_div4096(longint v);
    longint q = v / 4096;
    if (v < 0 && q * 4096 != v) q--;
    return int'(q);
  endfunction

  initial begin
    int cm [8][8];   // coefficient matrix applied to y (even rows use y0..3)
    int a_, b_, c_, d_, e_, f_, g_;
    a_ = kcoef(1); b_ = kcoef(2); c_ = kcoef(3); d_ = kcoef(4);
    e_ = kcoef(5); f_ = kcoef(6); g_ = kcoef(7);
    cm[0] = '{d_, d_, d_, d_, 0, 0, 0, 0};
    cm[2] = '{b_, f_, -f_, -b_, 0, 0, 0, 0};
    cm[4] = '{d_, -d_, -d_, d_, 0, 0, 0, 0};
    cm[6] = '{f_, -b_, b_, -f_, 0, 0, 0, 0};
    cm[1] = '{0, 0, 0, 0, a_, c_, e_, g_};
    cm[3] = '{0, 0, 0, 0, c_, -g_, -a_, -e_};
    cm[5] = '{0, 0, 0, 0, e_, -a_, g_, c_};
    cm[7] = '{0, 0, 0, 0, g_, -e_, c_, -a_};

    for (int t = 0; t < 4000; t++) begin
      int xv [8];
      int y [8];
      int L, span;
      span = (t % 2 == 0) ? 512 : 2900;
      for (int k = 0; k < 8; k++) begin
        xv[k] = int'($urandom_range(2 * span)) - span;
        x[k]  = 14'(xv[k]);
      end
      if (t < 500) cfg = '{trunc: TRUNC_0, deact: 8'h00, comp_en: 1'b0};
      else begin
        cfg.trunc   = trunc_e'($urandom_range(3));
        cfg.deact   = (t % 3 == 0) ? 8'($urandom) : 8'h00;
        cfg.comp_en = 1'($urandom_range(1));
      end
      #1;
      L = 2 * int'(cfg.trunc);
      if (L > 0) n_trunc++;
      if (cfg.deact != 0) n_deact++;
      if (cfg.comp_en && L > 0) n_comp++;
      for (int k = 0; k < 4; k++) begin
        y[k]     = xv[k] + xv[7 - k];
        y[k + 4] = xv[k] - xv[7 - k];
      end
      for (int k = 0; k < 8; k++) y[k] = int'($floor(real'(y[k]) / real'(1 << L))) * (1 << L);
      for (int i = 0; i < 8; i++) begin
        longint acc;
        int expw;
        acc = 0;
        for (int k = 0; k < 8; k++) acc += longint'(cm[i][k]) * longint'(y[k]);
        expw = floor_div4096(acc);
        if (cfg.comp_en && i == 0) expw += int'($floor(0.5 * $cos(4 * PI / 16) * ((1 << L) - 1) / 2.0));
        if (cfg.comp_en && i == 1)
          expw += int'($floor(0.5 * ($cos(PI / 16) + $cos(3 * PI / 16) + $cos(5 * PI / 16)
                                      + $cos(7 * PI / 16)) * ((1 << L) - 1) / 8.0));
        if (cfg.deact[i]) expw = 0;
        checks++;
        if (w[i] != 14'(expw)) begin
          failures++;
          if (failures < 10) $display("t=%0d W%0d got %0d exp %0d (L=%0d)", t, i, w[i], 14'(expw), L);
        end
        // real-valued DCT at full precision
        if (t < 500) begin
          real r;
          r = 0.0;
          for (int k = 0; k < 8; k++) r += xv[k] * $cos((2 * k + 1) * i * PI / 16.0);
          r = r * ((i == 0) ? 1.0 / $sqrt(2.0) : 1.0) / 2.0;
          checks++;
          if ((real'(w[i]) - r) > 8.0 || (r - real'(w[i])) > 8.0) begin
            failures++;
            $display("real DCT mismatch W%0d %0d vs %f", i, w[i], r);
          end
        end
      end
    end
    checks++;
    if (n_trunc == 0 || n_deact == 0 || n_comp == 0) failures++;
    $display("truncated=%0d deactivated=%0d compensated=%0d", n_trunc, n_deact, n_comp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
