// gsf_window: turns a raster-order pixel stream into the 5x5 sub-matrix
// (window) around each pixel, one window per input pixel.
//
// Four line buffers hold the last four image rows. They are kept in one
// memory of IMG_W words, each word the four pixels of one column (rows r-4..r-1).
// When pixel (r,c) arrives the word of column c is read, the column
// {word, pixel} is shifted into a 5x5 register array from the right, and the
// word is written back with its oldest pixel dropped and the new one added.
// After that the array holds rows r-4..r and columns c-4..c, which is the
// window centred on pixel (r-2, c-2).
//
// A window is reported only when it lies fully inside the image (r >= 4 and
// c >= 4), so outputs cover centres 2..IMG_H-3 by 2..IMG_W-3; the two-pixel
// border is not filtered. That border policy is this design's own choice.
//
// Interface: in_sof marks the first pixel of a frame (row 0, column 0) and
// restarts the position counters; in_last is passed on with the window of the
// last pixel. Timing: out_win, out_row/out_col (position of the centre pixel)
// and out_last are valid in the clock after the pixel was accepted. One pixel
// per clock, gaps allowed.
module gsf_window
  import gsf_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned CW   = $clog2(IMG_W),
  localparam int unsigned RW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic          in_last,
  input  pix_t          in_pix,
  output logic          out_valid,
  output window_t       out_win,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_last
);

  typedef pix_t [WIN-2:0] lbword_t;  // [0] oldest row (r-4) .. [3] row r-1

  lbword_t       lbuf [IMG_W];
  logic [CW-1:0] col, cur_col;
  logic [RW-1:0] row, cur_row;
  lbword_t       rd_word, wr_word;
  pix_t [WIN-1:0] new_col;

  always_comb begin
    cur_col = in_sof ? '0 : col;
    cur_row = in_sof ? '0 : row;
    rd_word = lbuf[cur_col];
    for (int i = 0; i < WIN-1; i++) new_col[i] = rd_word[i];
    new_col[WIN-1] = in_pix;
    for (int i = 0; i < WIN-2; i++) wr_word[i] = rd_word[i+1];
    wr_word[WIN-2] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (in_valid) lbuf[cur_col] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_last  <= 1'b0;
      out_win   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < WIN; r++) begin
          for (int c = 0; c < WIN-1; c++) out_win[r][c] <= out_win[r][c+1];
          out_win[r][WIN-1] <= new_col[r];
        end
        if (32'(cur_col) == IMG_W-1) begin
          col <= '0;
          row <= (32'(cur_row) == IMG_H-1) ? '0 : cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
        out_valid <= (32'(cur_row) >= WIN-1) && (32'(cur_col) >= WIN-1);
        out_row   <= cur_row - RW'(2);
        out_col   <= cur_col - CW'(2);
        out_last  <= in_last;
      end
    end
  end

endmodule
