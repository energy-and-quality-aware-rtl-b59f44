// tb_dct2d: random 8x8 pixel blocks through the 2-D DCT.
// Reference: the JPEG forward DCT F(u,v) = C(u)C(v)/4 sum sum (p-128) cos cos in
// real arithmetic. At full precision every coefficient must be within 1.0 of it
// (12.2 output format). With W7 switched off (level 2), row 7 and column 7 must
// be zero and the rest within 3.0; with 6-bit truncation (which drops 16-pixel
// steps of each butterfly output) the DC term must stay within 80. Also checks the timing: columns 0..7 on eight consecutive cycles
// starting one cycle after the eighth row, in_ready low until the last column.
module tb_dct2d;
  import emq_pkg::*;
  logic clk = 0, rst_n = 0;
  dct_cfg_t cfg;
  logic in_valid = 0, in_ready;
  logic [7:0] in_row [8];
  logic out_valid;
  logic [2:0] out_col;
  logic signed [13:0] out_coef [8];
  int checks = 0, failures = 0, cyc = 0;
  real PI = 3.14159265358979;
  int n_full = 0, n_deact = 0, n_trunc = 0;

  dct2d dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int mode_sel);
    int pix [8][8];
    real ref_f [8][8];
    int last_row_cyc;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) pix[r][c] = (mode_sel == 3) ? 255 : int'($urandom_range(255));
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real s;
        s = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            s += (pix[r][c] - 128) * $cos((2 * c + 1) * u * PI / 16.0) * $cos((2 * r + 1) * v * PI / 16.0);
        s = s / 4.0 * ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) * ((v == 0) ? 1.0 / $sqrt(2.0) : 1.0);
        ref_f[v][u] = s;   // v vertical (row) frequency, u horizontal
      end
    case (mode_sel)
      0:       cfg = '{trunc: TRUNC_0, deact: 8'h00, comp_en: 1'b1};
      1:       cfg = '{trunc: TRUNC_2, deact: 8'h80, comp_en: 1'b1};
      default: cfg = '{trunc: TRUNC_6, deact: 8'h00, comp_en: 1'b1};
    endcase
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      checks++;
      if (!in_ready) failures++;
      in_valid = 1;
      for (int c = 0; c < 8; c++) in_row[c] = 8'(pix[r][c]);
      last_row_cyc = cyc + 1;
    end
    @(negedge clk);
    in_valid = 0;
    for (int u = 0; u < 8; u++) begin
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_col != 3'(u) || cyc != last_row_cyc + 1 + u || (in_ready && u < 7)) begin
        failures++;
        $display("timing: out_valid=%0d col=%0d cyc=%0d", out_valid, out_col, cyc - last_row_cyc);
      end
      for (int v = 0; v < 8; v++) begin
        real got, err, tol;
        got = real'(out_coef[v]) / 4.0;
        err = got - ref_f[v][u];
        if (err < 0) err = -err;
        tol = (mode_sel == 0) ? 1.0 : 3.0;
        checks++;
        if (mode_sel == 1 && (u == 7 || v == 7)) begin
          if (out_coef[v] != 0) begin failures++; $display("deactivated (%0d,%0d) not zero", v, u); end
        end else if (mode_sel >= 2) begin
          if (u == 0 && v == 0 && err > 80.0) begin failures++; $display("DC off by %f", err); end
        end else if (err > tol) begin
          failures++;
          $display("mode %0d F(%0d,%0d) got %f ref %f", mode_sel, v, u, got, ref_f[v][u]);
        end
      end
    end
    if (mode_sel == 0) n_full++; else if (mode_sel == 1) n_deact++; else n_trunc++;
  endtask

  initial begin
    cfg = '{trunc: TRUNC_0, deact: 8'h00, comp_en: 1'b1};
    for (int c = 0; c < 8; c++) in_row[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 24; b++) run_block(b % 4);
    checks++;
    if (n_full == 0 || n_deact == 0 || n_trunc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
