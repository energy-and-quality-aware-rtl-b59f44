// tb_uep_ecc_encoder: random words under all three codes. The expected check
// bits are built here from the column rule: data bit i has the syndrome column
// {segment bits, c(i mod 32)}, c(n) being the n-th 6-bit value with at least two
// ones; segment bits are none for (39,32), seg[0] for (72,64) and seg[1:0] for
// (137,128); the last check bit is the parity of data and all other check bits.
// Also checks that data bits beyond the selected code do not change the result
// and that the (39,32) checks equal the (72,64) checks of the same word with an
// empty upper half, minus the seventh row.
module tb_uep_ecc_encoder;
  import emq_pkg::*;
  ecc_code_e code;
  logic [127:0] data;
  logic [8:0] parity;
  int checks = 0, failures = 0;
  int colv [32];

  uep_ecc_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] ref_parity(int c, logic [127:0] d);
    int k, nh;
    logic [8:0] p;
    logic ov;
    k  = (c == 0) ? 32 : (c == 1) ? 64 : 128;
    nh = (c == 0) ? 6 : (c == 1) ? 7 : 8;
    p = '0;
    ov = 0;
    for (int i = 0; i < k; i++) begin
      int col;
      col = colv[i % 32] | ((i / 32) << 6);
      if (d[i]) begin
        for (int r = 0; r < nh; r++) if (((col >> r) & 1) != 0) p[r] = ~p[r];
        ov = ~ov;
      end
    end
    for (int r = 0; r < nh; r++) ov = ov ^ p[r];
    p[nh] = ov;
    return p;
  endfunction

  initial begin
    int n;
    n = 0;
    for (int v = 1; v < 64 && n < 32; v++) begin
      int w;
      w = 0;
      for (int b = 0; b < 6; b++) w += (v >> b) & 1;
      if (w >= 2) begin colv[n] = v; n++; end
    end
    for (int t = 0; t < 3000; t++) begin
      logic [8:0] e;
      int c;
      c = t % 3;
      code = ecc_code_e'(c);
      data = {$urandom, $urandom, $urandom, $urandom};
      if (t % 50 == 0) data = 128'd1 << (t % 128);
      #1;
      e = ref_parity(c, data);
      checks++;
      if (parity !== e) begin
        failures++;
        if (failures < 10) $display("code %0d parity %b expected %b", c, parity, e);
      end
    end
    // nesting property
    for (int t = 0; t < 200; t++) begin
      logic [8:0] p39, p72;
      data = {96'd0, $urandom};
      code = ECC_39_32;   #1; p39 = parity;
      code = ECC_72_64;   #1; p72 = parity;
      checks++;
      if (p39[5:0] != p72[5:0] || p72[6] != 1'b0) failures++;
      // upper bits ignored by the shorter codes
      data[127:32] = {$urandom, $urandom, $urandom};
      code = ECC_39_32;   #1;
      checks++;
      if (parity != p39) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
