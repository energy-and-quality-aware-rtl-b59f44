// dct2d: 8x8 two-dimensional DCT built from two 1-D DCT engines and a transpose
// buffer (row DCT -> transpose unit -> column DCT).
//
// Rows of eight 8-bit pixels enter one per cycle; each is level-shifted by -128,
// converted to 12.2 fixed point and transformed by the row engine, and the
// eight results are written as one row of the 8x8 transpose buffer. After the
// eighth row the buffer is read column by column into the column engine, and
// the eight 2-D coefficients of column u (F[v][u], v = 0..7) leave per cycle.
// Both engines use the same configuration (truncation, deactivation,
// compensation), so a deactivated W_i removes horizontal and vertical frequency i.
//
// Handshake: in_ready is high while rows are being collected (in_valid &&
// in_ready accepts a row); out_valid marks a column on out_coef with its index
// out_col. Timing: 8 cycles to load, then columns 0..7 on 8 consecutive cycles
// starting one cycle after the last row; a new block can start after column 7,
// i.e. 16 cycles per block. Coefficients use the 12.2 format; with the 1/2
// scaling of each 1-D pass the result equals the JPEG forward DCT.
// The single shared buffer (load and read phases do not overlap) is this
// design's choice.
module dct2d
  import emq_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  dct_cfg_t                cfg,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [7:0]              in_row [8],
  output logic                    out_valid,
  output logic [2:0]              out_col,
  output logic signed [DCT_W-1:0] out_coef [8]
);
  typedef enum logic {S_LOAD, S_COLS} state_e;
  state_e state;
  logic [2:0] cnt;
  logic signed [DCT_W-1:0] tbuf [8][8];   // tbuf[row][u]

  logic signed [DCT_W-1:0] row_x [8], row_w [8];
  logic signed [DCT_W-1:0] col_x [8], col_w [8];

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      row_x[k] = DCT_W'(signed'({1'b0, in_row[k]}) - 10'sd128) <<< DCT_FRAC;
      col_x[k] = tbuf[k][cnt];
    end
  end

  dct1d_trunc u_row (.x(row_x), .cfg(cfg), .w(row_w));
  dct1d_trunc u_col (.x(col_x), .cfg(cfg), .w(col_w));

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      for (int r = 0; r < 8; r++) begin
        out_coef[r] <= '0;
        for (int c = 0; c < 8; c++) tbuf[r][c] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          for (int u = 0; u < 8; u++) tbuf[cnt][u] <= row_w[u];
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= S_COLS;
        end
        S_COLS: begin
          out_valid <= 1'b1;
          out_col   <= cnt;
          out_coef  <= col_w;
          cnt       <= cnt + 3'd1;
          if (cnt == 3'd7) state <= S_LOAD;
        end
      endcase
    end
  end

endmodule
