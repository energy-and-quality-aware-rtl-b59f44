// emq_top: energy/quality-scalable multimedia kernels, side by side.
//
// Four independent datapaths share one clock and reset; each has its own ports:
//   * video: hoc_sad_unit, the 4-way SAD unit with high-order clipping for
//     motion estimation (Thr 32) and intra prediction (Thr 64);
//   * JPEG: dct2d (row DCT, transpose, column DCT) whose truncation and
//     coefficient deactivation come from dct_level_ctrl (Q and PSNR scheme), and
//     vos_compensator, which repairs voltage-overscaling errors in quantized
//     zig-zag coefficients (quantizer and zig-zag scan are outside, so it has its
//     own coefficient input);
//   * filtering: fir_mac_lpf, the MAC low-pass filter with truncation and
//     unbiased-error compensation;
//   * JPEG2000 tile memory protection: uep_ecc_encoder produces check bits for
//     the word written to the (external) SRAM tile memory, uep_ecc_decoder
//     checks a word read back, and bitplane_corrector cleans the high bit planes
//     of a code block read from that memory.
// Timing of each path is that of its block; the top adds no registers.
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the R2 overflow assertion in
// hoc_sad_unit, not logic.
module emq_top
  import emq_pkg::*;
#(
  parameter int unsigned FIR_N = 9,        // FIR taps (3x3 kernel)
  parameter int unsigned BPC_S = 32,       // JPEG2000 code block side
  parameter int unsigned BPC_W = 16,       // JPEG2000 coefficient width
  localparam int unsigned FIR_ACC_W = 2 * 8 + $clog2(FIR_N) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---- SAD unit ----
  input  logic                          sad_in_valid,
  input  logic                          sad_in_first,
  input  logic                          sad_in_last,
  input  sad_mode_e                     sad_mode,
  input  logic [SAD_LANES-1:0][PIX_W-1:0] sad_a,
  input  logic [SAD_LANES-1:0][PIX_W-1:0] sad_b,
  output logic [R2_W-1:0]               sad_r2,
  output logic [15:0]                   sad_px,
  output logic                          sad_valid,
  output logic [2:0]                    sad_clip_count,
  // ---- JPEG DCT engine ----
  input  logic [6:0]                    dct_q,
  input  psnr_scheme_e                  dct_scheme,
  input  logic                          dct_override_en,
  input  logic [3:0]                    dct_level_override,
  output logic [3:0]                    dct_level,
  input  logic                          dct_in_valid,
  output logic                          dct_in_ready,
  input  logic [7:0]                    dct_in_row [8],
  output logic                          dct_out_valid,
  output logic [2:0]                    dct_out_col,
  output logic signed [DCT_W-1:0]       dct_out_coef [8],
  // ---- JPEG VOS coefficient compensator ----
  input  logic [6:0]                    vos_q,
  input  logic                          vos_in_valid,
  output logic                          vos_in_ready,
  input  logic signed [DCT_W-1:0]       vos_in_coef,
  input  logic                          vos_flush,
  output logic                          vos_out_valid,
  output logic [5:0]                    vos_out_idx,
  output logic signed [DCT_W-1:0]       vos_out_coef,
  output logic                          vos_out_step1_fix,
  output logic                          vos_out_step2_fix,
  // ---- FIR MAC low-pass filter ----
  input  logic [7:0]                    fir_h [FIR_N],
  input  logic [3:0]                    fir_trunc_l,
  input  logic                          fir_comp_en,
  input  logic                          fir_in_valid,
  input  logic [7:0]                    fir_x,
  output logic                          fir_y_valid,
  output logic [FIR_ACC_W-1:0]          fir_y,
  output logic [FIR_ACC_W-1:0]          fir_corr,
  // ---- UEP ECC towards / from the tile memory ----
  input  ecc_code_e                     enc_code,
  input  logic [127:0]                  enc_data,
  output logic [8:0]                    enc_parity,
  input  ecc_code_e                     dec_code,
  input  logic [127:0]                  dec_data,
  input  logic [8:0]                    dec_parity,
  output logic [127:0]                  dec_data_out,
  output logic                          dec_corrected,
  output logic                          dec_uncorrectable,
  // ---- JPEG2000 bit-plane corrector (code block read from the tile memory) ----
  input  bpc_method_e                   bpc_method,
  input  logic                          bpc_high_band,
  input  logic [2:0]                    bpc_n_erase,
  input  logic [8:0]                    bpc_thr,
  input  logic                          bpc_in_valid,
  output logic                          bpc_in_ready,
  input  logic [BPC_W-1:0]              bpc_in_coef,
  output logic                          bpc_out_valid,
  output logic [BPC_W-1:0]              bpc_out_coef,
  output logic                          bpc_busy,
  output logic [4:0]                    bpc_planes_done,
  output logic [15:0]                   bpc_bits_cleared
);

  hoc_sad_unit u_sad (
    .clk, .rst_n,
    .in_valid  (sad_in_valid),
    .in_first  (sad_in_first),
    .in_last   (sad_in_last),
    .mode      (sad_mode),
    .a         (sad_a),
    .b         (sad_b),
    .sad       (sad_r2),
    .sad_px    (sad_px),
    .sad_valid (sad_valid),
    .clip_count(sad_clip_count)
  );

  dct_cfg_t dct_cfg;

  dct_level_ctrl u_lvl (
    .q             (dct_q),
    .scheme        (dct_scheme),
    .override_en   (dct_override_en),
    .level_override(dct_level_override),
    .level         (dct_level),
    .cfg           (dct_cfg)
  );

  dct2d u_dct (
    .clk, .rst_n,
    .cfg      (dct_cfg),
    .in_valid (dct_in_valid),
    .in_ready (dct_in_ready),
    .in_row   (dct_in_row),
    .out_valid(dct_out_valid),
    .out_col  (dct_out_col),
    .out_coef (dct_out_coef)
  );

  vos_compensator u_vos (
    .clk, .rst_n,
    .q            (vos_q),
    .in_valid     (vos_in_valid),
    .in_ready     (vos_in_ready),
    .in_coef      (vos_in_coef),
    .flush        (vos_flush),
    .out_valid    (vos_out_valid),
    .out_idx      (vos_out_idx),
    .out_coef     (vos_out_coef),
    .out_step1_fix(vos_out_step1_fix),
    .out_step2_fix(vos_out_step2_fix)
  );

  fir_mac_lpf #(.N(FIR_N), .M(7)) u_fir (
    .clk, .rst_n,
    .h       (fir_h),
    .trunc_l (fir_trunc_l),
    .comp_en (fir_comp_en),
    .in_valid(fir_in_valid),
    .x       (fir_x),
    .y_valid (fir_y_valid),
    .y       (fir_y),
    .corr    (fir_corr)
  );

  uep_ecc_encoder u_enc (
    .code  (enc_code),
    .data  (enc_data),
    .parity(enc_parity)
  );

  uep_ecc_decoder u_dec (
    .code             (dec_code),
    .data_in          (dec_data),
    .parity_in        (dec_parity),
    .data_out         (dec_data_out),
    .err_corrected    (dec_corrected),
    .err_uncorrectable(dec_uncorrectable)
  );

  bitplane_corrector #(.S(BPC_S), .W(BPC_W), .CNT_W(9)) u_bpc (
    .clk, .rst_n,
    .method      (bpc_method),
    .high_band   (bpc_high_band),
    .n_erase     (bpc_n_erase),
    .thr         (bpc_thr),
    .in_valid    (bpc_in_valid),
    .in_ready    (bpc_in_ready),
    .in_coef     (bpc_in_coef),
    .out_valid   (bpc_out_valid),
    .out_coef    (bpc_out_coef),
    .busy        (bpc_busy),
    .planes_done (bpc_planes_done),
    .bits_cleared(bpc_bits_cleared)
  );

endmodule
