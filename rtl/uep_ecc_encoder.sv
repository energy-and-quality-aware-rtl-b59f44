// uep_ecc_encoder: one encoder for the three SECDED codes used for unequal error
// protection (UEP) of the JPEG2000 tile memory: (39,32) for the most important
// bit planes, (72,64) for the middle ones and (137,128) for the rest.
//
// The stronger codes are derived from the weaker one so that hardware is shared.
// Three parity generators work on b1-b32, b33-b64 and b65-b128 (the third is two
// 32-bit generators). Check-bit layout (extended Hamming, overall parity last):
//   (39,32)  : ps[5:0] = h(seg0),               ps[6] = overall parity
//   (72,64)  : pm[5:0] = h(seg0)^h(seg1),       pm[6] = p(seg1),
//              pm[7]   = overall parity
//   (137,128): pw[5:0] = pm[5:0]^h(seg2)^h(seg3), pw[6] = p(seg1)^p(seg3),
//              pw[7]   = p(seg2)^p(seg3),       pw[8] = overall parity
// so the (39,32) check matrix is the first half of the (72,64) matrix without its
// seventh row. Combiner 1 forms pm from generators 1 and 2, combiner 2 forms pw
// from combiner 1 and generator 3, and the multiplexer picks ps, pm or pw by
// 'code'. The inputs of unused generators are gated to zero so that they do not
// toggle. The concrete column assignment is this design's choice.
//
// Data bit b(n) is data[n-1]. Check bits above the selected code's count are 0.
// Purely combinational.
module uep_ecc_encoder
  import emq_pkg::*;
(
  input  ecc_code_e    code,
  input  logic [127:0] data,
  output logic [8:0]   parity
);
  logic        en_mid, en_hi;
  logic [31:0] seg [4];
  logic [5:0]  h [4];
  logic [3:0]  p;

  assign en_mid = (code != ECC_39_32);
  assign en_hi  = (code == ECC_137_128);

  always_comb begin
    seg[0] = data[31:0];
    seg[1] = en_mid ? data[63:32]  : '0;
    seg[2] = en_hi  ? data[95:64]  : '0;
    seg[3] = en_hi  ? data[127:96] : '0;
  end

  for (genvar s = 0; s < 4; s++) begin : g_gen
    ecc_pargen32 u_gen (.d(seg[s]), .h(h[s]), .p(p[s]));
  end

  logic [6:0] ps;
  logic [7:0] pm;
  logic [8:0] pw;

  always_comb begin
    // generator 1 alone: (39,32)
    ps[5:0] = h[0];
    ps[6]   = p[0] ^ (^h[0]);
    // combiner 1: (72,64)
    pm[5:0] = h[0] ^ h[1];
    pm[6]   = p[1];
    pm[7]   = p[0] ^ p[1] ^ (^pm[6:0]);
    // combiner 2: (137,128)
    pw[5:0] = pm[5:0] ^ h[2] ^ h[3];
    pw[6]   = pm[6] ^ p[3];
    pw[7]   = p[2] ^ p[3];
    pw[8]   = (^p) ^ (^pw[7:0]);
    // output multiplexer
    unique case (code)
      ECC_39_32:   parity = {2'b00, ps};
      ECC_72_64:   parity = {1'b0, pm};
      ECC_137_128: parity = pw;
      default:     parity = '0;
    endcase
  end
endmodule
