// dct_level_ctrl: picks the precision/computation level of the DCT engine from
// the JPEG quality factor Q and an allowed PSNR loss.
//
// The reduction levels follow a fixed order (found as the majority vote over six
// training images with a binary decision tree): starting from full precision,
//   L1 2-bit truncation, L2 +W7 off, L3 4-bit truncation, L4 +W6 off, L5 +W5 off,
//   L6 6-bit truncation, L7 (W4 would be next but stays on because it shares its
//   unit with W0, so L7 = L6), L8 +W3 off.
// The level for a given Q and scheme comes from a table with columns
// Q = 75, 65, 55, 45, 35, 25, 15, 5:
//   Scheme I   (dPSNR < 0.5 dB): L2 L2 L3 L3 L3 L3 L4 L6
//   Scheme II  (dPSNR < 1 dB)  : L3 L3 L3 L3 L4 L4 L5 L8
//   Scheme III (dPSNR < 1.5 dB): L4 L4 L4 L4 L5 L5 L6 L8
// A Q between two columns uses the column of the next higher Q (the safer
// choice); Q above 75 uses the 75 column. These two rules, SCHEME_OFF (level 0)
// and the level_override input are this design's choices.
//
// Purely combinational. Truncation compensation is always on.
module dct_level_ctrl
  import emq_pkg::*;
(
  input  logic [6:0]   q,               // JPEG quality factor 1..100
  input  psnr_scheme_e scheme,
  input  logic         override_en,     // use level_override instead of the table
  input  logic [3:0]   level_override,
  output logic [3:0]   level,
  output dct_cfg_t     cfg
);
  logic [2:0] col;

  always_comb begin
    if      (q > 7'd65) col = 3'd0;
    else if (q > 7'd55) col = 3'd1;
    else if (q > 7'd45) col = 3'd2;
    else if (q > 7'd35) col = 3'd3;
    else if (q > 7'd25) col = 3'd4;
    else if (q > 7'd15) col = 3'd5;
    else if (q > 7'd5)  col = 3'd6;
    else                col = 3'd7;
  end

  logic [3:0] tl;                       // level from the Q/scheme table
  always_comb begin
    unique case (scheme)
      SCHEME_I: begin
        case (col)
          3'd0, 3'd1:             tl = 4'd2;
          3'd2, 3'd3, 3'd4, 3'd5: tl = 4'd3;
          3'd6:                   tl = 4'd4;
          default:                tl = 4'd6;
        endcase
      end
      SCHEME_II: begin
        case (col)
          3'd0, 3'd1, 3'd2, 3'd3: tl = 4'd3;
          3'd4, 3'd5:             tl = 4'd4;
          3'd6:                   tl = 4'd5;
          default:                tl = 4'd8;
        endcase
      end
      SCHEME_III: begin
        case (col)
          3'd0, 3'd1, 3'd2, 3'd3: tl = 4'd4;
          3'd4, 3'd5:             tl = 4'd5;
          3'd6:                   tl = 4'd6;
          default:                tl = 4'd8;
        endcase
      end
      default: tl = 4'd0;
    endcase
  end

  assign level = override_en ? ((level_override > 4'd8) ? 4'd8 : level_override) : tl;

  // level -> engine configuration
  always_comb begin
    cfg.comp_en = 1'b1;
    if      (level >= 4'd6) cfg.trunc = TRUNC_6;
    else if (level >= 4'd3) cfg.trunc = TRUNC_4;
    else if (level >= 4'd1) cfg.trunc = TRUNC_2;
    else                    cfg.trunc = TRUNC_0;
    cfg.deact    = '0;
    cfg.deact[7] = (level >= 4'd2);
    cfg.deact[6] = (level >= 4'd4);
    cfg.deact[5] = (level >= 4'd5);
    cfg.deact[3] = (level >= 4'd8);
  end

endmodule
