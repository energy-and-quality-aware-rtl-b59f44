// tb_uep_ecc_decoder: random words of each code are encoded (by the encoder),
// then 0, 1 or 2 random bits of the codeword (data or check bits of that code)
// are flipped. Expected: no error -> data unchanged, no flags; one error ->
// original data restored and err_corrected; two errors -> err_uncorrectable and
// not err_corrected.
module tb_uep_ecc_decoder;
  import emq_pkg::*;
  ecc_code_e code;
  logic [127:0] data, rx_data, data_out;
  logic [8:0] parity, rx_par;
  logic err_corrected, err_uncorrectable;
  int checks = 0, failures = 0;
  int n_err [3] = '{0, 0, 0};

  uep_ecc_encoder u_enc (.code(code), .data(data), .parity(parity));
  uep_ecc_decoder dut (.code(code), .data_in(rx_data), .parity_in(rx_par),
                       .data_out(data_out), .err_corrected(err_corrected),
                       .err_uncorrectable(err_uncorrectable));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int c, k, np, nerr, p1, p2;
      logic [127:0] dmask;
      c = t % 3;
      k  = (c == 0) ? 32 : (c == 1) ? 64 : 128;
      np = (c == 0) ? 7 : (c == 1) ? 8 : 9;
      dmask = (c == 2) ? '1 : ((128'd1 << k) - 1);
      code = ecc_code_e'(c);
      data = {$urandom, $urandom, $urandom, $urandom} & dmask;
      #1;
      rx_data = data; rx_par = parity;
      nerr = (t / 3) % 3;
      p1 = $urandom_range(k + np - 1);
      p2 = p1;
      while (p2 == p1) p2 = $urandom_range(k + np - 1);
      if (nerr >= 1) begin
        if (p1 < k) rx_data[p1] = ~rx_data[p1]; else rx_par[p1 - k] = ~rx_par[p1 - k];
      end
      if (nerr == 2) begin
        if (p2 < k) rx_data[p2] = ~rx_data[p2]; else rx_par[p2 - k] = ~rx_par[p2 - k];
      end
      #1;
      n_err[nerr]++;
      checks++;
      case (nerr)
        0: if ((data_out & dmask) != data || err_corrected || err_uncorrectable) failures++;
        1: if ((data_out & dmask) != data || !err_corrected || err_uncorrectable) begin
             failures++;
             if (failures < 10) $display("code %0d single error at %0d not corrected", c, p1);
           end
        default: if (!err_uncorrectable || err_corrected) begin
             failures++;
             if (failures < 10) $display("code %0d double error %0d,%0d not detected", c, p1, p2);
           end
      endcase
    end
    $display("no/single/double error cases: %0d %0d %0d", n_err[0], n_err[1], n_err[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
