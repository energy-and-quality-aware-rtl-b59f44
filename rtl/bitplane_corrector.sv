// bitplane_corrector: removes memory-error bits from the high bit planes of a
// JPEG2000 code block of a high-frequency subband (HL, LH, HH) before it goes to
// the bit-plane coder.
//
// High-subband wavelet coefficients are small, so their top magnitude planes are
// almost empty, and the few true ones sit on connected edges. Isolated ones in
// those planes are most likely SRAM errors of a voltage-scaled tile memory.
// Four methods of increasing cost, selected by 'method':
//   Method 1: clear the n_erase highest magnitude planes.
//   Method 2: from the top plane down, count the ones of the plane (saturating
//     CNT_W-bit counter); if the count is below 'thr' clear the whole plane,
//     otherwise stop. thr is meant to be twice the expected number of errors.
//   Method 3: same plane selection, but an eligible plane is not cleared
//     wholesale: a one at (r,c) of plane i is kept only if another one exists in
//     its 3x3x4 neighbourhood (the 3x3 windows in planes i+1, i, i-1, i-2),
//     otherwise it is cleared (all-zero detector on the neighbourhood).
//   Method 4: like Method 3, but ones at the four direct neighbours of (r,c) in
//     plane i do not count as support, since a burst error produces adjacent
//     wrong bits there.
// Coefficients are W-bit sign-magnitude words (bit W-1 sign); planes W-2..0.
// Decisions within a plane use that plane as it was read (clears are collected
// in a mask and applied at the end of the plane); plane i+1 is already corrected.
// Positions outside the block and planes outside 0..W-2 read as zero.
//
// The block buffer is stored as bit planes, each plane as S row words of S
// bits. Counting, clearing and the neighbourhood check handle one whole row of
// one plane per cycle: the ones of a row are added to the counter, and S
// all-zero detectors look at rows r-1, r, r+1 of the four planes at once. Which four neighbours form the burst pattern, the word format
// and the row-parallel organisation are this design's choices; plane counting,
// the counter width and the neighbourhood follow the description.
//
// Interface: load S*S coefficients in raster order with in_valid/in_ready; the
// configuration inputs are sampled when the last one is accepted (high_band = 0
// passes the block through untouched). The block then streams out in raster
// order on out_valid/out_coef. Timing: S*S load cycles; Method 1 S cycles per
// cleared plane; Methods 2-4 per examined plane S counting cycles (+ S check
// cycles for Methods 3/4) + 1 clear cycle; then S*S output cycles.
// planes_done and bits_cleared report what was done.
module bitplane_corrector
  import emq_pkg::*;
#(
  parameter int unsigned S     = 32,    // code block is S x S
  parameter int unsigned W     = 16,    // coefficient width
  parameter int unsigned CNT_W = 9      // ones counter width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bpc_method_e       method,
  input  logic              high_band,
  input  logic [2:0]        n_erase,      // Method 1
  input  logic [CNT_W-1:0]  thr,          // Methods 2-4
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [W-1:0]      in_coef,
  output logic              out_valid,
  output logic [W-1:0]      out_coef,
  output logic              busy,
  output logic [4:0]        planes_done,  // planes cleared or filtered
  output logic [15:0]       bits_cleared
);
  localparam int unsigned RW   = $clog2(S);
  localparam int unsigned TOP  = W - 2;   // highest magnitude plane
  localparam int unsigned PLW  = $clog2(W);
  localparam int unsigned CW   = $clog2(S + 1);

  typedef enum logic [2:0] {S_LOAD, S_M1, S_COUNT, S_NBR, S_APPLY, S_OUT} state_e;
  state_e state;

  logic [W-1:0][S-1:0][S-1:0] planes;     // [bit plane][row][column]
  logic [S-1:0][S-1:0]        emask;      // bits of the current plane to clear
  logic [RW-1:0]     row, col;
  logic [PLW-1:0]    plane;
  logic [2:0]        m1_left;
  logic [CNT_W-1:0]  cnt;
  bpc_method_e       meth_q;
  logic [CNT_W-1:0]  thr_q;

  // row r of magnitude plane pl, zero outside the block / plane range
  function automatic logic [S-1:0] row_plane(int r, int pl);
    if (r < 0 || r >= int'(S) || pl < 0 || pl > int'(TOP)) return '0;
    return planes[pl][r];
  endfunction

  // ---------------- row-parallel counting and neighbourhood check ----------------
  logic [S-1:0]     cur_row;
  logic [CW-1:0]    row_ones, iso_ones;
  logic [CNT_W-1:0] cnt_next;
  logic [S-1:0]     isolated;             // ones of cur_row without support

  always_comb begin
    logic [S+1:0] win [4][3];             // [plane offset][row offset], padded by 1
    int r, p;
    r = int'(row);
    p = int'(plane);
    cur_row  = row_plane(r, p);
    row_ones = CW'($countones(cur_row));
    if (int'(cnt) + int'(row_ones) > (1 << CNT_W) - 1) cnt_next = '1;
    else                                               cnt_next = cnt + CNT_W'(row_ones);
    for (int dp = 0; dp < 4; dp++)
      for (int dr = 0; dr < 3; dr++)
        win[dp][dr] = {1'b0, row_plane(r + dr - 1, p + dp - 2), 1'b0};
    for (int c = 0; c < int'(S); c++) begin
      logic sup;
      sup = 1'b0;
      for (int dp = 0; dp < 4; dp++)
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++) begin
            if (dp == 2 && dr == 1 && dc == 1) continue;            // the bit itself
            if (meth_q == BPC_METHOD4 && dp == 2 && (dr == 1 || dc == 1)) continue;
            if (win[dp][dr][c + dc]) sup = 1'b1;
          end
      isolated[c] = cur_row[c] & ~sup;
    end
    iso_ones = CW'($countones(isolated));
  end

  // the word at (row, col), reassembled from the planes
  logic [W-1:0] word_out;
  always_comb
    for (int b = 0; b < int'(W); b++) word_out[b] = planes[b][row][col];

  // ---------------- bit-plane storage, one register per plane row ----------------
  logic ld_en, m1_en, ap_en;
  assign ld_en = (state == S_LOAD) && in_valid;
  assign m1_en = (state == S_M1);
  assign ap_en = (state == S_APPLY);

  for (genvar gb = 0; gb < int'(W); gb++) begin : g_plane
    for (genvar gr = 0; gr < int'(S); gr++) begin : g_row
      logic [S-1:0] q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          q <= '0;
        else if (ld_en && row == RW'(gr))
          q[col] <= in_coef[gb];
        else if (m1_en && plane == PLW'(gb) && row == RW'(gr))
          q <= '0;
        else if (ap_en && plane == PLW'(gb))
          q <= q & ~emask[gr];
      end
      assign planes[gb][gr] = q;
    end
  end

  for (genvar gr = 0; gr < int'(S); gr++) begin : g_emask
    logic [S-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        q <= '0;
      else if (row == RW'(gr) && state == S_COUNT && meth_q == BPC_METHOD2)
        q <= cur_row;
      else if (row == RW'(gr) && state == S_NBR)
        q <= isolated;
    end
    assign emask[gr] = q;
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; row <= '0; col <= '0; plane <= PLW'(TOP); cnt <= '0; m1_left <= '0;
      meth_q <= BPC_METHOD1; thr_q <= '0;
      out_valid <= 1'b0; out_coef <= '0; planes_done <= '0; bits_cleared <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          col <= col + 1'b1;
          if (col == RW'(S - 1)) begin
            col <= '0;
            row <= row + 1'b1;
            if (row == RW'(S - 1)) begin
              row          <= '0;
              plane        <= PLW'(TOP);
              cnt          <= '0;
              meth_q       <= method;
              thr_q        <= thr;
              m1_left      <= n_erase;
              planes_done  <= '0;
              bits_cleared <= '0;
              if (!high_band)                  state <= S_OUT;
              else if (method == BPC_METHOD1 && n_erase == 3'd0) state <= S_OUT;
              else if (method == BPC_METHOD1)  state <= S_M1;
              else                             state <= S_COUNT;
            end
          end
        end

        S_M1: begin                           // clear the top planes, a row per cycle
          bits_cleared <= bits_cleared + 16'(row_ones);
          row <= row + 1'b1;
          if (row == RW'(S - 1)) begin
            row         <= '0;
            planes_done <= planes_done + 5'd1;
            m1_left     <= m1_left - 3'd1;
            if (m1_left == 3'd1 || plane == '0) state <= S_OUT;
            else                                plane <= plane - 1'b1;
          end
        end

        S_COUNT: begin                        // saturating ones counter, a row per cycle
          cnt <= cnt_next;
          row <= row + 1'b1;
          if (row == RW'(S - 1)) begin
            row <= '0;
            if (cnt_next < thr_q) begin
              if (meth_q == BPC_METHOD2) begin
                bits_cleared <= bits_cleared + 16'(cnt_next);
                state <= S_APPLY;
              end else begin
                state <= S_NBR;
              end
            end else begin
              state <= S_OUT;                 // first plane that is kept: stop
            end
          end
        end

        S_NBR: begin                          // all-zero detectors, a row per cycle
          bits_cleared <= bits_cleared + 16'(iso_ones);
          row <= row + 1'b1;
          if (row == RW'(S - 1)) begin
            row   <= '0;
            state <= S_APPLY;
          end
        end

        S_APPLY: begin                        // clear the collected bits of this plane
          planes_done <= planes_done + 5'd1;
          cnt         <= '0;
          if (plane == '0) state <= S_OUT;
          else begin
            plane <= plane - 1'b1;
            state <= S_COUNT;
          end
        end

        S_OUT: begin
          out_valid <= 1'b1;
          out_coef  <= word_out;
          col <= col + 1'b1;
          if (col == RW'(S - 1)) begin
            col <= '0;
            row <= row + 1'b1;
            if (row == RW'(S - 1)) begin
              row   <= '0;
              state <= S_LOAD;
            end
          end
        end

        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
