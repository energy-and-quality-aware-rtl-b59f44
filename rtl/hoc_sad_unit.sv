// hoc_sad_unit: four-way parallel sum-of-absolute-differences unit with
// high-order clipping, for motion estimation (inter) and intra prediction.
//
// Four pixel pairs enter per cycle (block sizes in H.264 are multiples of 4).
// Each pair goes through an hoc_ad_unit, giving a 5-bit clipped AD (R1); the four
// R1 values are added to the 13-bit running SAD (R2). The low 7 bits of R2 are
// updated by full adders, the upper 6 bits by a merged 2-bit half-adder chain
// (ha2_chain) that only has to propagate one carry. All values are in units of
// 2 (inter, Thr = 32) or 4 (intra, Thr = 64); sad_px gives the SAD in pixel units.
//
// Interface: in_valid with a[0..3], b[0..3]; in_first marks the first group of a
// block (R2 restarts from zero), in_last the last group. mode is sampled with
// each group. Timing: 3-stage pipeline (input registers A/B, R1, R2); sad_valid
// pulses 3 cycles after the in_last group was accepted, one block every
// (pixels / 4) cycles with back-to-back blocks. Sub-sampled search variants need
// no change here: they simply feed fewer pixel pairs.
module hoc_sad_unit
  import emq_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         in_first,
  input  logic                         in_last,
  input  sad_mode_e                    mode,
  input  logic [SAD_LANES-1:0][PIX_W-1:0] a,
  input  logic [SAD_LANES-1:0][PIX_W-1:0] b,
  output logic [R2_W-1:0]              sad,       // R2, units of 2 or 4
  output logic [15:0]                  sad_px,    // R2 scaled to pixel units
  output logic                         sad_valid,
  output logic [2:0]                   clip_count // clipped ADs in the last R1 group
);
  // ---- stage 1: input registers A and B ----
  logic                                 v1, f1, l1;
  sad_mode_e                            m1;
  logic [SAD_LANES-1:0][PIX_W-1:0]      a1, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; m1 <= SAD_INTER;
      a1 <= '0;   b1 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        f1 <= in_first; l1 <= in_last; m1 <= mode;
        a1 <= a;        b1 <= b;
      end
    end
  end

  // ---- stage 2: four HOC AD units -> R1 ----
  logic [SAD_LANES-1:0][R1_W-1:0] r1_d;
  logic [SAD_LANES-1:0]           clip_d;

  for (genvar i = 0; i < SAD_LANES; i++) begin : g_ad
    hoc_ad_unit u_ad (
      .mode   (m1),
      .a      (a1[i]),
      .b      (b1[i]),
      .r1     (r1_d[i]),
      .clipped(clip_d[i])
    );
  end

  logic                           v2, f2, l2;
  sad_mode_e                      m2;
  logic [SAD_LANES-1:0][R1_W-1:0] r1;
  logic [SAD_LANES-1:0]           clip2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; f2 <= 1'b0; l2 <= 1'b0; m2 <= SAD_INTER;
      r1 <= '0;   clip2 <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        f2 <= f1; l2 <= l1; m2 <= m1;
        r1 <= r1_d; clip2 <= clip_d;
      end
    end
  end

  // ---- stage 3: 5-input addition into R2 ----
  logic [6:0]      sum4;      // sum of four 5-bit R1 values (<= 64)
  logic [R2_W-1:0] r2_base;
  logic [7:0]      low_sum;
  logic [5:0]      high_sum;
  logic            high_cout;
  logic [R2_W-1:0] r2_next;

  always_comb begin
    sum4 = 7'(r1[0]) + 7'(r1[1]) + 7'(r1[2]) + 7'(r1[3]);
    r2_base = f2 ? '0 : sad;
    low_sum = {1'b0, r2_base[6:0]} + {1'b0, sum4};
  end

  ha2_chain #(.W(6)) u_hachain (
    .x   (r2_base[12:7]),
    .cin (low_sum[7]),
    .sum (high_sum),
    .cout(high_cout)
  );

  assign r2_next = {high_sum, low_sum[6:0]};

  logic sad_mode_intra;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad            <= '0;
      sad_valid      <= 1'b0;
      sad_mode_intra <= 1'b0;
      clip_count     <= '0;
    end else begin
      sad_valid <= v2 && l2;
      if (v2) begin
        sad            <= r2_next;
        sad_mode_intra <= (m2 == SAD_INTRA);
        clip_count     <= 3'(clip2[0]) + 3'(clip2[1]) + 3'(clip2[2]) + 3'(clip2[3]);
      end
    end
  end

  assign sad_px = sad_mode_intra ? {1'b0, sad, 2'b00} : {2'b00, sad, 1'b0};

  // R2 is sized for a 16x16 block: it must never wrap.
  assert property (@(posedge clk) disable iff (!rst_n) v2 |-> !high_cout)
    else $error("hoc_sad_unit: SAD register R2 overflow");

endmodule
