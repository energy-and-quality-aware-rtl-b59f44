// uep_ecc_decoder: single-error-correcting, double-error-detecting decoder for
// the nested (39,32), (72,64) and (137,128) codes of uep_ecc_encoder.
//
// It reuses the same hierarchical parity structure: the received data (only the
// bits of the selected code) are re-encoded, the recomputed Hamming bits are
// XORed with the received ones to give the syndrome, and the overall parity of
// the whole received word is checked.
//   syndrome 0, parity ok      : no error
//   parity wrong, syndrome 0   : the overall parity bit itself flipped
//   parity wrong, syndrome = column of a data bit : that bit is corrected
//   parity wrong, syndrome of one check bit       : check bit flipped, data ok
//   parity ok, syndrome != 0   : double error, reported (data unchanged)
// A syndrome that matches nothing with wrong parity is also reported as
// uncorrectable. The decoder structure is this design's own, the description
// only states it is built like the encoder.
//
// Purely combinational. The re-encoder's overall parity bit (pre[8]) is not
// needed, since the overall check is done on the received word directly.
module uep_ecc_decoder
  import emq_pkg::*;
(
  input  ecc_code_e    code,
  input  logic [127:0] data_in,
  input  logic [8:0]   parity_in,
  output logic [127:0] data_out,
  output logic         err_corrected,   // a single error was found (and fixed)
  output logic         err_uncorrectable
);
  logic [127:0] dmask, dk;
  logic [8:0]   pmask, pk, pre;
  logic [7:0]   syn;
  logic         ovf;                     // overall parity failure
  logic [3:0]   nham;                    // number of Hamming check bits

  always_comb begin
    unique case (code)
      ECC_39_32:   begin dmask = {96'd0, {32{1'b1}}}; pmask = 9'h07f; nham = 4'd6; end
      ECC_72_64:   begin dmask = {64'd0, {64{1'b1}}}; pmask = 9'h0ff; nham = 4'd7; end
      default:     begin dmask = {128{1'b1}};         pmask = 9'h1ff; nham = 4'd8; end
    endcase
    dk = data_in & dmask;
    pk = parity_in & pmask;
  end

  uep_ecc_encoder u_reenc (.code(code), .data(dk), .parity(pre));

  always_comb begin
    logic [7:0] hm;
    hm  = 8'((9'(1) << nham) - 9'd1);
    syn = (pre[7:0] ^ pk[7:0]) & hm;
    ovf = (^dk) ^ (^pk);
  end

  // syndrome of data bit i: {segment bits, ham_col32}
  function automatic logic [7:0] col_of(int unsigned i, ecc_code_e c);
    logic [1:0] sg;
    sg = 2'(i / 32);
    unique case (c)
      ECC_39_32: return {2'b00, ham_col32(i % 32)};
      ECC_72_64: return {1'b0, sg[0], ham_col32(i % 32)};
      default:   return {sg[1], sg[0], ham_col32(i % 32)};
    endcase
  endfunction

  logic [127:0] flip;
  always_comb begin
    flip = '0;
    for (int unsigned i = 0; i < 128; i++) begin
      if (dmask[i] && ovf && syn != 8'd0 && syn == col_of(i, code)) flip[i] = 1'b1;
    end
    data_out          = data_in ^ flip;
    err_corrected     = ovf && ((syn == 8'd0) || (flip != '0) || ($countones(syn) == 1));
    err_uncorrectable = (!ovf && syn != 8'd0) || (ovf && !err_corrected);
  end

endmodule
