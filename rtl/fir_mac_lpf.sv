// fir_mac_lpf: MAC-based low-pass FIR filter with low-order truncation and an
// unbiased truncation-error compensation term.
//
// Computes y = sum_{k=0}^{N-1} h(k) x(n-k) with one multiply-accumulate per
// cycle. Both the coefficient and the input sample pass through AND gates that
// clear their lowest L bits, so only the high-order bits toggle in the
// multiplier and adder. After the N-th product a final adder adds the expected
// value of the error this truncation causes (uniform, independent input bits):
//   corr = [ (2^L - 1) * sum h(k)  +  (2^(M+1) - 2^L) * sum h(k)[L-1:0] ] / 2
// (floor), M+1 being the data width. It depends only on the coefficients and L,
// so it is formed combinationally from the coefficient inputs ("pre-computation")
// and used once per output, i.e. 1/N of the time.
//
// Data: unsigned M+1 = 8-bit samples and coefficients; coefficients are
// fractions of 2^(M+1) (a 3x3 Gaussian kernel sums to 256). y is the full
// product-sum in units of 2^-(M+1) of a sample LSB, not rounded back.
// Interface: in_valid/x deliver the N samples of one output window in tap order
// (the caller supplies x(n-k) for k = 0..N-1); y_valid pulses with y one cycle
// after the N-th sample. Timing: N cycles per output, back to back.
module fir_mac_lpf #(
  parameter int unsigned N = 9,          // taps (3x3 Gaussian kernel)
  parameter int unsigned M = 7,          // data are M+1 bits wide
  localparam int unsigned DW    = M + 1,
  localparam int unsigned ACC_W = 2 * DW + $clog2(N) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DW-1:0]            h [N],      // filter coefficients
  input  logic [$clog2(DW+1)-1:0]  trunc_l,    // L, low-order bits dropped (0..M)
  input  logic                     comp_en,    // add the compensation term
  input  logic                     in_valid,
  input  logic [DW-1:0]            x,
  output logic                     y_valid,
  output logic [ACC_W-1:0]         y,
  output logic [ACC_W-1:0]         corr        // current compensation term
);
  logic [$clog2(N)-1:0] tap;
  logic [ACC_W-1:0]     acc;                   // the D register
  logic [DW-1:0]        mask, lowmask, xt, ht;
  logic [2*DW-1:0]      prod;
  logic [ACC_W-1:0]     acc_next;

  assign mask = ~((DW'(1) << trunc_l) - DW'(1));
  assign lowmask = ~mask;
  assign xt   = x & mask;
  assign ht   = h[tap] & mask;
  assign prod = xt * ht;
  assign acc_next = acc + ACC_W'(prod);

  // pre-computed unbiased estimator of the truncation error
  always_comb begin
    logic [ACC_W+DW-1:0] sum_h, sum_hl, t;
    sum_h  = '0;
    sum_hl = '0;
    for (int k = 0; k < N; k++) begin
      sum_h  = sum_h  + (ACC_W+DW)'(h[k]);
      sum_hl = sum_hl + (ACC_W+DW)'(h[k] & lowmask);
    end
    t = (((ACC_W+DW)'(1) << trunc_l) - 1) * sum_h
      + (((ACC_W+DW)'(1) << DW) - ((ACC_W+DW)'(1) << trunc_l)) * sum_hl;
    corr = ACC_W'(t >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap     <= '0;
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        if (tap == $clog2(N)'(N - 1)) begin
          tap     <= '0;
          acc     <= '0;
          y       <= acc_next + (comp_en ? corr : '0);   // final adder
          y_valid <= 1'b1;
        end else begin
          tap <= tap + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

  initial assert (N >= 2) else $error("fir_mac_lpf: N must be at least 2");
endmodule
