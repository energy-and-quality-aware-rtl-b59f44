// hoc_ad_unit: absolute difference of two pixels with high-order clipping (HOC).
//
// Most absolute differences (ADs) in motion estimation and intra prediction are
// small, and large ADs mostly belong to candidate blocks that are never selected.
// This unit therefore computes an AD exactly only when it is below a threshold
// Thr and otherwise returns Thr itself as a correction value:
//   AD' = |A - B|  if |A - B| < Thr,   AD' = Thr  otherwise
// on pixels whose lowest bit(s) are already dropped.
//
// Structure (after the design description): a shifter aligns the active range,
// then three subtractors run in parallel on 7-bit aligned operands
//   LOB1 = A[3:0] - B[3:0], LOB2 = B[3:0] - A[3:0]  (low-order part)
//   HOC  = B[6:4] - A[6:4]                            (high-order part)
// and a small HOC logic decides from the 3-bit HOC result, its carry Cout2 (which
// separates +1 from -7 and -1 from +7) and the LOB carries whether R1 takes LOB1,
// LOB2 or the correction value (bit 4 of R1, weight Thr).
//   mode = SAD_INTER: operands are pixel bits [7:1], Thr = 32, R1 in units of 2
//   mode = SAD_INTRA: operands are pixel bits [7:2], Thr = 64, R1 in units of 4
// The select rules use the carry (no-borrow) of both LOB subtractors so that an
// AD of exactly Thr also yields Thr; this refines the one-carry wording of the
// description and is this design's choice.
//
// Purely combinational; the surrounding SAD unit registers inputs and R1.
// Bit 0 of each pixel is never read: it is truncated in both modes.
module hoc_ad_unit
  import emq_pkg::*;
(
  input  sad_mode_e        mode,
  input  logic [PIX_W-1:0] a,     // current-block pixel
  input  logic [PIX_W-1:0] b,     // reference-block pixel
  output logic [R1_W-1:0]  r1,    // clipped AD, units 2 (inter) or 4 (intra)
  output logic             clipped // 1 when the correction value was used
);
  logic [6:0] a_s, b_s;          // shifter outputs
  logic [4:0] lob1, lob2;        // {carry, difference}
  logic [3:0] hoc;               // {carry, difference}
  logic       sel_lob2;

  // Shifters: align the 4-bit LOB range to [4:1] (inter) or [5:2] (intra).
  always_comb begin
    if (mode == SAD_INTRA) begin
      a_s = {1'b0, a[7:2]};
      b_s = {1'b0, b[7:2]};
    end else begin
      a_s = a[7:1];
      b_s = b[7:1];
    end
  end

  // LOB1, LOB2 and HOC subtractors (A + ~B + 1; carry 1 means no borrow).
  always_comb begin
    lob1 = {1'b0, a_s[3:0]} + {1'b0, ~b_s[3:0]} + 5'd1;
    lob2 = {1'b0, b_s[3:0]} + {1'b0, ~a_s[3:0]} + 5'd1;
    hoc  = {1'b0, b_s[6:4]} + {1'b0, ~a_s[6:4]} + 4'd1;
  end

  // HOC logic: select signal for LOB1/LOB2 and the correction bit.
  always_comb begin
    sel_lob2 = 1'b0;
    clipped  = 1'b1;
    unique case (hoc)                  // {Cout2, B_high - A_high}
      4'b1000: begin                    // same high part: |low difference|
        clipped  = 1'b0;
        sel_lob2 = lob2[4];            // B_low >= A_low
      end
      4'b1001: begin                   // B_high = A_high + 1
        clipped  = lob2[4];            // B_low >= A_low  ->  B - A >= Thr
        sel_lob2 = 1'b1;
      end
      4'b0111: begin                   // A_high = B_high + 1
        clipped  = lob1[4];            // A_low >= B_low  ->  A - B >= Thr
        sel_lob2 = 1'b0;
      end
      default: clipped = 1'b1;         // |high difference| >= 2 (incl. +-7 wrap)
    endcase
  end

  assign r1 = clipped ? 5'b10000 : {1'b0, (sel_lob2 ? lob2[3:0] : lob1[3:0])};

endmodule
