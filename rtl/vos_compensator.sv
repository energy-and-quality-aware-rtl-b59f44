// vos_compensator: corrects errors that voltage overscaling of the DCT datapath
// leaves in quantized, zig-zag ordered JPEG coefficients.
//
// Timing errors in ripple/carry-save adders hit the most significant bits, so an
// erroneous coefficient is either (1) a small value with broken sign-extension
// bits or (2) a value much larger than its neighbours. Two steps fix these:
//   Step 1 (majority voter): for zig-zag group g (coefficients 0-15, 16-31, 32-47,
//     48-63) a quality-dependent width k(Q,g) suffices. Where k <= 7, bits k..13
//     must all equal the sign; three of them (bits 13, 12 and k) are voted and
//     all of bits k..13 are set to the majority.
//   Step 2 (coefficient comparator + average calculator): AC coefficient j of
//     block k is replaced by the average of its zig-zag neighbours j-1 and j+1
//     in the same block when it differs by more than THR_g both from that
//     average and from the average of coefficient j in blocks k-1 and k+1.
// Widths k(Q,g): Q<=5: 6,5,4,3; Q<=15: 7,6,5,4; Q<=30: 8,7,6,5; Q<=55: 9,8,7,6;
// Q<=70: 9,8,7,7 (step 1 is off above Q=70). Thresholds 64, 32, 16, 8 (groups
// 1..4); the design description gives 64 and 8, the middle two are this
// design's choice, as are: which three bits are voted, the skipping of AC1 and
// AC63 (a neighbour would be the DC value or missing) and of the first block
// and the block before a flush (no neighbour block), and replacement by the
// same-block average.
//
// Interface: coefficients (14-bit two's complement) stream in on in_valid/
// in_ready, 64 per block, zig-zag order. Step 1 is applied on entry. Block k is
// corrected and streamed out (out_valid, out_idx, out_coef) once block k+1 has
// fully arrived; flush (a pulse between blocks) releases the last block.
// Timing: 64 input cycles per block, then 64 output cycles during which
// in_ready is low. Three 64-entry block buffers rotate as prev/cur/next.
module vos_compensator
  import emq_pkg::*;
#(
  parameter int unsigned W = DCT_W          // coefficient width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [6:0]          q,            // JPEG quality factor 1..100
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_coef,
  input  logic                flush,
  output logic                out_valid,
  output logic [5:0]          out_idx,
  output logic signed [W-1:0] out_coef,
  output logic                out_step1_fix,  // sign extension was repaired on entry
  output logic                out_step2_fix   // value replaced by the neighbour average
);
  typedef enum logic {S_IN, S_PROC} state_e;
  state_e state;

  logic signed [W-1:0] bufm [3][64];
  logic                s1fix [3][64];
  logic [1:0]          p_prev, p_cur, p_next;
  logic                have_prev, have_cur, has_next;
  logic [5:0]          wr_idx, j;

  // ---------------- Step 1: majority voter on the input ----------------
  function automatic int unsigned grp_width(logic [6:0] qq, logic [1:0] gidx);
    int unsigned base;
    if      (qq <= 7'd5)  base = 6;
    else if (qq <= 7'd15) base = 7;
    else if (qq <= 7'd30) base = 8;
    else if (qq <= 7'd55) base = 9;
    else if (qq <= 7'd70) return (gidx == 2'd3) ? 7 : 9 - int'(gidx);
    else                  return W;           // outside the table: no step 1
    return base - int'(gidx);
  endfunction

  logic signed [W-1:0] s1_coef;
  logic                s1_changed;
  always_comb begin
    int unsigned k;
    logic        maj;
    k          = grp_width(q, wr_idx[5:4]);
    s1_coef    = in_coef;
    s1_changed = 1'b0;
    maj        = 1'b0;
    if (k <= 7) begin
      maj = (in_coef[W-1] & in_coef[W-2]) | (in_coef[W-1] & in_coef[k])
          | (in_coef[W-2] & in_coef[k]);
      for (int b = 0; b < W; b++) if (b >= k) s1_coef[b] = maj;
      s1_changed = (s1_coef != in_coef);
    end
  end

  // ---------------- Step 2: comparator and average calculator ----------------
  function automatic logic [W:0] thr_of(logic [1:0] gidx);
    case (gidx)
      2'd0:    return (W+1)'(64);
      2'd1:    return (W+1)'(32);
      2'd2:    return (W+1)'(16);
      default: return (W+1)'(8);
    endcase
  endfunction

  function automatic logic [W:0] absdiff(logic signed [W:0] a, logic signed [W:0] b);
    logic signed [W+1:0] d;
    d = (W+2)'(a) - (W+2)'(b);
    return (d < 0) ? (W+1)'(-d) : (W+1)'(d);
  endfunction

  logic signed [W:0] c_j, avg_in, avg_blk;
  logic              test_in, test_blk, do_fix;
  always_comb begin
    logic signed [W+1:0] s_in, s_blk;
    c_j      = (W+1)'(bufm[p_cur][j]);
    s_in     = (W+2)'(bufm[p_cur][j - 6'd1]) + (W+2)'(bufm[p_cur][j + 6'd1]);
    s_blk    = (W+2)'(bufm[p_prev][j]) + (W+2)'(bufm[p_next][j]);
    avg_in   = (W+1)'(s_in >>> 1);
    avg_blk  = (W+1)'(s_blk >>> 1);
    test_in  = absdiff(c_j, avg_in)  > thr_of(j[5:4]);
    test_blk = absdiff(c_j, avg_blk) > thr_of(j[5:4]);
    do_fix   = (j >= 6'd2) && (j <= 6'd62) && have_prev && has_next && test_in && test_blk;
  end

  assign in_ready = (state == S_IN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN;
      p_prev <= 2'd0; p_cur <= 2'd1; p_next <= 2'd2;
      have_prev <= 1'b0; have_cur <= 1'b0; has_next <= 1'b0;
      wr_idx <= '0; j <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_coef <= '0;
      out_step1_fix <= 1'b0; out_step2_fix <= 1'b0;
      for (int b = 0; b < 3; b++)
        for (int i = 0; i < 64; i++) begin
          bufm[b][i]  <= '0;
          s1fix[b][i] <= 1'b0;
        end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IN: begin
          if (in_valid) begin
            bufm[p_next][wr_idx]  <= s1_coef;
            s1fix[p_next][wr_idx] <= s1_changed;
            wr_idx <= wr_idx + 6'd1;
            if (wr_idx == 6'd63) begin
              if (have_cur) begin
                has_next <= 1'b1;
                j        <= '0;
                state    <= S_PROC;
              end else begin
                // first block: it becomes the current block
                p_cur    <= p_next;
                p_next   <= p_cur;
                have_cur <= 1'b1;
              end
            end
          end else if (flush && have_cur && wr_idx == 6'd0) begin
            has_next <= 1'b0;
            j        <= '0;
            state    <= S_PROC;
          end
        end
        S_PROC: begin
          out_valid     <= 1'b1;
          out_idx       <= j;
          out_step1_fix <= s1fix[p_cur][j];
          out_step2_fix <= do_fix;
          if (do_fix) begin
            out_coef         <= W'(avg_in);
            bufm[p_cur][j]   <= W'(avg_in);
          end else begin
            out_coef <= bufm[p_cur][j];
          end
          j <= j + 6'd1;
          if (j == 6'd63) begin
            state <= S_IN;
            if (has_next) begin
              // rotate: cur -> prev, next -> cur
              p_prev    <= p_cur;
              p_cur     <= p_next;
              p_next    <= p_prev;
              have_prev <= 1'b1;
              have_cur  <= 1'b1;
            end else begin
              have_prev <= 1'b0;
              have_cur  <= 1'b0;
            end
          end
        end
      endcase
    end
  end

endmodule
