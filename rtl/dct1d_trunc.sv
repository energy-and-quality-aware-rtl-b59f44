// dct1d_trunc: 8-point 1-D DCT with scalable precision and coefficient switch-off.
//
// Computes W_i = c_i/2 * sum_k x_k cos((2k+1) i pi/16) with the usual even/odd
// decomposition: a butterfly forms y0..y3 = x_k + x_(7-k) and y4..y7 = x_k - x_(7-k);
// W0/W4 share the sub-expressions (y0+y3) and (y1+y2); W2, W6 use y0..y3 and the
// odd outputs W1, W3, W5, W7 use y4..y7 with the constants a..g = cos(k pi/16)/2.
// All data are 14-bit two's complement with 2 fraction bits (12.2 fixed point).
//
// Energy knobs (set through cfg):
//   * truncation: AND gates at the inputs of every coefficient unit clear the
//     lowest 0, 2, 4 or 6 bits of the y values;
//   * deactivation: cfg.deact[i] gates all inputs of the W_i unit to zero, so the
//     unit does not toggle and W_i = 0;
//   * compensation: when truncating, the expected truncation error of the two most
//     important outputs is added back through one adder each:
//       W0 += floor(d (2^L - 1) / 2),  W1 += floor((a + c + e + g) (2^L - 1) / 8)
//     (the estimator as given in the design description, in output LSBs).
// Products are truncated (floor) back to 2 fraction bits. The constant fraction
// width (12 bits) is this design's choice.
//
// Purely combinational.
module dct1d_trunc
  import emq_pkg::*;
(
  input  logic signed [DCT_W-1:0] x [8],
  input  dct_cfg_t                cfg,
  output logic signed [DCT_W-1:0] w [8]
);
  localparam int YW = DCT_W + 1;            // butterfly width
  localparam int PW = YW + COEF_FRAC + 3;   // product-sum width

  logic signed [YW-1:0] y [8];
  logic signed [YW-1:0] yt [8];             // after the truncation AND gates
  logic signed [YW-1:0] mask;

  // expected truncation error estimates for W0 and W1 (output LSBs)
  function automatic int comp_w0(int unsigned l);
    return (CD * ((1 << l) - 1) / 2) >>> COEF_FRAC;
  endfunction
  function automatic int comp_w1(int unsigned l);
    return ((CA + CC + CE + CG) * ((1 << l) - 1) / 8) >>> COEF_FRAC;
  endfunction

  // first-stage butterfly
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      y[k]     = YW'(x[k]) + YW'(x[7-k]);
      y[k + 4] = YW'(x[k]) - YW'(x[7-k]);
    end
    mask = ~((YW'(1) <<< trunc_bits(cfg.trunc)) - YW'(1));
    for (int k = 0; k < 8; k++) yt[k] = y[k] & mask;
  end

  // per-unit input gating (deactivation) and the coefficient units
  function automatic logic signed [YW-1:0] g(logic signed [YW-1:0] v, logic off);
    return off ? '0 : v;
  endfunction

  logic signed [PW-1:0] s [8];
  always_comb begin
    logic signed [YW:0] e0, e1;
    // W0 / W4 unit (shared sub-expressions)
    e0   = (YW+1)'(g(yt[0], cfg.deact[0] & cfg.deact[4])) + (YW+1)'(g(yt[3], cfg.deact[0] & cfg.deact[4]));
    e1   = (YW+1)'(g(yt[1], cfg.deact[0] & cfg.deact[4])) + (YW+1)'(g(yt[2], cfg.deact[0] & cfg.deact[4]));
    s[0] = PW'(CD) * PW'(e0 + e1);
    s[4] = PW'(CD) * PW'(e0 - e1);
    // W2 and W6 units
    s[2] = PW'(CB) * PW'(g(yt[0], cfg.deact[2])) + PW'(CF) * PW'(g(yt[1], cfg.deact[2]))
         - PW'(CF) * PW'(g(yt[2], cfg.deact[2])) - PW'(CB) * PW'(g(yt[3], cfg.deact[2]));
    s[6] = PW'(CF) * PW'(g(yt[0], cfg.deact[6])) - PW'(CB) * PW'(g(yt[1], cfg.deact[6]))
         + PW'(CB) * PW'(g(yt[2], cfg.deact[6])) - PW'(CF) * PW'(g(yt[3], cfg.deact[6]));
    // odd units
    s[1] = PW'(CA) * PW'(g(yt[4], cfg.deact[1])) + PW'(CC) * PW'(g(yt[5], cfg.deact[1]))
         + PW'(CE) * PW'(g(yt[6], cfg.deact[1])) + PW'(CG) * PW'(g(yt[7], cfg.deact[1]));
    s[3] = PW'(CC) * PW'(g(yt[4], cfg.deact[3])) - PW'(CG) * PW'(g(yt[5], cfg.deact[3]))
         - PW'(CA) * PW'(g(yt[6], cfg.deact[3])) - PW'(CE) * PW'(g(yt[7], cfg.deact[3]));
    s[5] = PW'(CE) * PW'(g(yt[4], cfg.deact[5])) - PW'(CA) * PW'(g(yt[5], cfg.deact[5]))
         + PW'(CG) * PW'(g(yt[6], cfg.deact[5])) + PW'(CC) * PW'(g(yt[7], cfg.deact[5]));
    s[7] = PW'(CG) * PW'(g(yt[4], cfg.deact[7])) - PW'(CE) * PW'(g(yt[5], cfg.deact[7]))
         + PW'(CC) * PW'(g(yt[6], cfg.deact[7])) - PW'(CA) * PW'(g(yt[7], cfg.deact[7]));
  end

  // output scaling, deactivation and W0/W1 compensation adders
  always_comb begin
    logic signed [DCT_W-1:0] c0, c1;
    c0 = '0;
    c1 = '0;
    if (cfg.comp_en) begin
      c0 = DCT_W'(comp_w0(trunc_bits(cfg.trunc)));
      c1 = DCT_W'(comp_w1(trunc_bits(cfg.trunc)));
    end
    for (int i = 0; i < 8; i++) begin
      w[i] = cfg.deact[i] ? '0 : DCT_W'(s[i] >>> COEF_FRAC);
    end
    if (!cfg.deact[0]) w[0] = w[0] + c0;
    if (!cfg.deact[1]) w[1] = w[1] + c1;
  end

endmodule
