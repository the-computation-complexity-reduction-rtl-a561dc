// tb_gsf_window: self-checking test of the 5x5 window generator.
// Two random 9x8 frames are streamed in raster order with random idle
// clocks between pixels. Every window that comes out is compared with the
// 5x5 neighbourhood of its reported centre in the stored image, the set of
// centres must be exactly rows/columns 2..size-3, each once, and the last
// flag must arrive with the last centre. Output follows input by one clock.
module tb_gsf_window;
  import gsf_pkg::*;

  localparam int W = 9;
  localparam int H = 8;
  localparam int CW = $clog2(W);
  localparam int RW = $clog2(H);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_sof, in_last, out_valid, out_last;
  pix_t in_pix;
  window_t out_win;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;

  int checks = 0, failures = 0;
  pix_t img [H][W];
  int seen [H][W];
  int gaps = 0;

  gsf_window #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check every window in the clock after its last pixel went in
  logic prev_valid, prev_last_in, acc_valid, acc_last;
  int   prev_r, prev_c, acc_r, acc_c;
  always @(posedge clk) begin
    acc_valid <= in_valid && prev_valid;
    acc_last  <= prev_last_in;
    acc_r     <= prev_r;
    acc_c     <= prev_c;
  end
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      int r, c;
      r = int'(out_row); c = int'(out_col);
      checks++;
      if (!acc_valid || r != acc_r - 2 || c != acc_c - 2 || r < 2 || c < 2 ||
          r > H-3 || c > W-3) begin
        failures++;
        $display("FAIL window at %0d,%0d after pixel %0d,%0d", r, c, acc_r, acc_c);
      end else begin
        seen[r][c]++;
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) begin
            checks++;
            if (out_win[i][j] != img[r-2+i][c-2+j]) begin
              failures++;
              $display("FAIL centre %0d,%0d [%0d][%0d]=%0d exp %0d", r, c, i, j,
                       out_win[i][j], img[r-2+i][c-2+j]);
            end
          end
      end
      checks++;
      if (out_last != acc_last) begin
        failures++; $display("FAIL last flag");
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_sof = 1'b0; in_last = 1'b0; in_pix = '0;
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        img[r][c] = pix_t'($urandom);
        seen[r][c] = 0;
      end
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        if ($urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 1'b0; prev_valid = 1'b0; gaps++;
        end
        @(negedge clk);
        in_valid = 1'b1; in_pix = img[r][c];
        in_sof = (r == 0 && c == 0); in_last = (r == H-1 && c == W-1);
        prev_valid = 1'b1; prev_r = r; prev_c = c; prev_last_in = in_last;
      end
      @(negedge clk); in_valid = 1'b0; prev_valid = 1'b0;
      @(negedge clk);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        checks++;
        if (seen[r][c] != ((r >= 2 && r <= H-3 && c >= 2 && c <= W-3) ? 1 : 0)) begin
          failures++;
          $display("FAIL frame %0d centre %0d,%0d seen %0d times", f, r, c, seen[r][c]);
        end
      end
    end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no input gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
