// tb_dct_level_ctrl: every Q from 1 to 100 under every scheme, plus every
// override level. Expected levels come from the Q-column table (columns 75..5,
// a Q between columns takes the next higher column); the expected configuration
// of each level from the reduction order 2bit, +W7, +2bit, +W6, +W5, +2bit,
// (W4 kept), +W3.
module tb_dct_level_ctrl;
  import emq_pkg::*;
  logic [6:0]   q = '0;
  psnr_scheme_e scheme = SCHEME_I;
  logic         override_en = 1'b0;
  logic [3:0]   level_override = '0, level;
  dct_cfg_t     cfg;
  int checks = 0, failures = 0;

  dct_level_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cols [8] = '{75, 65, 55, 45, 35, 25, 15, 5};
  int tab [3][8] = '{'{2, 2, 3, 3, 3, 3, 4, 6},
                     '{3, 3, 3, 3, 4, 4, 5, 8},
                     '{4, 4, 4, 4, 5, 5, 6, 8}};
  // per level: truncation bits and deactivated coefficient set
  int      lt_bits [9] = '{0, 2, 2, 4, 4, 4, 6, 6, 6};
  bit [7:0] lt_off [9] = '{8'h00, 8'h00, 8'h80, 8'h80, 8'hC0, 8'hE0, 8'hE0, 8'hE0, 8'hE8};

  task automatic check_cfg(int lv);
    checks++;
    if (2 * int'(cfg.trunc) != lt_bits[lv] || cfg.deact != lt_off[lv] || !cfg.comp_en) begin
      failures++;
      $display("level %0d: trunc=%0d deact=%b", lv, 2 * int'(cfg.trunc), cfg.deact);
    end
  endtask

  initial begin
    #1;
    override_en = 0; level_override = 0;
    for (int s = 0; s < 4; s++) begin
      for (int qq = 1; qq <= 100; qq++) begin
        int c, expl;
        q = 7'(qq); scheme = psnr_scheme_e'(s);
        #1;
        c = 0;
        for (int k = 7; k >= 0; k--) if (cols[k] >= qq) begin c = k; break; end
        expl = (s == 3) ? 0 : tab[s][c];
        checks++;
        if (int'(level) != expl) begin
          failures++;
          $display("Q=%0d scheme=%0d level=%0d expected %0d", qq, s, level, expl);
        end
        check_cfg(expl);
      end
    end
    override_en = 1;
    for (int lv = 0; lv < 16; lv++) begin
      level_override = 4'(lv);
      #1;
      checks++;
      if (int'(level) != ((lv > 8) ? 8 : lv)) failures++;
      check_cfg((lv > 8) ? 8 : lv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
