// emq_pkg: types and constants shared by the energy/quality-scalable signal
// processing blocks (HOC SAD unit, truncating DCT, VOS coefficient compensator,
// UEP ECC codec and JPEG2000 bit-plane corrector).
//
// The numbers here follow the design description: SAD threshold 32 for inter and
// 64 for intra prediction, 14-bit DCT fixed point (12 integer + 2 fraction bits),
// truncation in 2-bit steps up to 6 bits, and SECDED codes (39,32), (72,64) and
// (137,128). The DCT coefficient scaling (COEF_FRAC) is this design's choice.
package emq_pkg;

  // ---------------- SAD (motion estimation / intra prediction) -------------
  typedef enum logic {
    SAD_INTER = 1'b0,   // Thr = 32, 1-bit low-order truncation, LOB = bits [4:1]
    SAD_INTRA = 1'b1    // Thr = 64, 2-bit low-order truncation, LOB = bits [5:2]
  } sad_mode_e;

  localparam int unsigned SAD_LANES  = 4;   // four AD computations per cycle
  localparam int unsigned PIX_W      = 8;   // pixel width
  localparam int unsigned R1_W       = 5;   // AD register width (units of 2 or 4)
  localparam int unsigned R2_W       = 13;  // SAD register width (units of 2 or 4)

  // ---------------- DCT ------------------------------------------------------
  localparam int unsigned DCT_W      = 14;  // 12 integer + 2 fractional bits
  localparam int unsigned DCT_FRAC   = 2;
  localparam int unsigned COEF_FRAC  = 12;  // fraction bits of a..g constants

  // Truncation of the 1-D DCT inputs, 2-bit granularity.
  typedef enum logic [1:0] {
    TRUNC_0 = 2'd0, TRUNC_2 = 2'd1, TRUNC_4 = 2'd2, TRUNC_6 = 2'd3
  } trunc_e;

  // Configuration of one 1-D DCT engine: truncation and deactivated outputs.
  typedef struct packed {
    trunc_e     trunc;    // low-order bits forced to zero at the unit inputs
    logic [7:0] deact;    // deact[i] = 1 switches coefficient W_i off (output 0)
    logic       comp_en;  // add the mean truncation error back to W0 and W1
  } dct_cfg_t;

  // PSNR-loss budget schemes of the level controller
  typedef enum logic [1:0] {
    SCHEME_I   = 2'd0,   // dPSNR < 0.5 dB
    SCHEME_II  = 2'd1,   // dPSNR < 1 dB
    SCHEME_III = 2'd2,   // dPSNR < 1.5 dB
    SCHEME_OFF = 2'd3    // full precision (level 0)
  } psnr_scheme_e;

  // DCT constants a..g = 0.5*cos(k*pi/16), k = 1..7, in COEF_FRAC fraction bits
  // (round(0.5*cos(k*pi/16) * 2^12)).
  localparam int CA = 2009;   // 0.5 cos(1 pi/16)
  localparam int CB = 1892;   // 0.5 cos(2 pi/16)
  localparam int CC = 1703;   // 0.5 cos(3 pi/16)
  localparam int CD = 1448;   // 0.5 cos(4 pi/16)
  localparam int CE = 1138;   // 0.5 cos(5 pi/16)
  localparam int CF = 784;    // 0.5 cos(6 pi/16)
  localparam int CG = 400;    // 0.5 cos(7 pi/16)

  function automatic int unsigned trunc_bits(trunc_e t);
    return 2 * int'(t);
  endfunction

  // ---------------- UEP ECC --------------------------------------------------
  typedef enum logic [1:0] {
    ECC_39_32   = 2'd0,   // strongest: 7 parity bits for 32 data bits
    ECC_72_64   = 2'd1,   // 8 parity bits for 64 data bits
    ECC_137_128 = 2'd2    // weakest: 9 parity bits for 128 data bits
  } ecc_code_e;

  // Hamming columns of the 32 data bits of a segment: data bit i gets the i-th
  // 6-bit value of weight >= 2 (3,5,6,7,9,...). Segment index bits are added
  // above it. The table is built once at elaboration.
  function automatic logic [31:0][5:0] ham_cols();
    logic [31:0][5:0] t;
    int unsigned n;
    t = '0;
    n = 0;
    for (int unsigned v = 3; v < 64; v++) begin
      if ((v & (v - 1)) != 0 && n < 32) begin
        t[n] = v[5:0];
        n++;
      end
    end
    return t;
  endfunction

  localparam logic [31:0][5:0] HAM_COL = ham_cols();

  function automatic logic [5:0] ham_col32(int unsigned i);
    return HAM_COL[i % 32];
  endfunction

  // ---------------- JPEG2000 bit-plane correction ---------------------------
  typedef enum logic [1:0] {
    BPC_METHOD1 = 2'd0,   // erase a fixed number of MSB planes
    BPC_METHOD2 = 2'd1,   // erase planes whose ones-count is below the threshold
    BPC_METHOD3 = 2'd2,   // 3x3x4 neighbourhood check on eligible planes
    BPC_METHOD4 = 2'd3    // as 3, direct neighbours in the plane give no support
  } bpc_method_e;

endpackage
