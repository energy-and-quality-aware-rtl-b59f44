// tb_hoc_ad_unit: exhaustive check of the clipped absolute-difference unit.
// For every pixel pair and both modes the output must equal
//   min(|(B>>s) - (A>>s)|, 16)  with s = 1 (inter) or 2 (intra),
// i.e. the exact truncated AD below the threshold and the correction value
// (16 units = 32 or 64) at or above it.
module tb_hoc_ad_unit;
  import emq_pkg::*;
  sad_mode_e  mode;
  logic [7:0] a, b;
  logic [4:0] r1;
  logic       clipped;
  int checks = 0, failures = 0;
  int n_clip = 0;

  hoc_ad_unit dut (.mode(mode), .a(a), .b(b), .r1(r1), .clipped(clipped));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int ia = 0; ia < 256; ia++) begin
        for (int ib = 0; ib < 256; ib++) begin
          int sh, d, exp_r1;
          mode = (m == 0) ? SAD_INTER : SAD_INTRA;
          a = 8'(ia); b = 8'(ib);
          #1;
          sh = (m == 0) ? 1 : 2;
          d  = (ib >> sh) - (ia >> sh);
          if (d < 0) d = -d;
          exp_r1 = (d < 16) ? d : 16;
          checks++;
          if (r1 != 5'(exp_r1) || clipped != (d >= 16)) begin
            failures++;
            if (failures < 10)
              $display("mismatch mode=%0d a=%0d b=%0d r1=%0d exp=%0d", m, ia, ib, r1, exp_r1);
          end
          if (clipped) n_clip++;
        end
      end
    end
    if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
