// tb_gsf_boundary_sum: self-checking test of the boundary summation stage.
// Random 5x5 windows are summed in every mode and compared with sums built
// from the squared distance of each pixel to the centre (0: centre, 1: B1,
// 2: B2, 4: B3, 5 and 8: B4). Groups the mode does not use must read zero.
// The one-clock latency and the side-band are checked too, and a second
// instance with B4_CORNERS = 0 must leave the four corners out of w4.
module tb_gsf_boundary_sum;
  import gsf_pkg::*;

  localparam int TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  es_mode_t in_es, out_es;
  window_t in_win;
  gsums_t out_sums;
  logic [TAG_W-1:0] in_tag, out_tag;

  int checks = 0, failures = 0;

  gsf_boundary_sum #(.TAG_W(TAG_W)) dut (.*);

  // second instance without the corner pixels in B4
  gsums_t nc_sums;
  logic nc_valid;
  es_mode_t nc_es;
  logic [TAG_W-1:0] nc_tag;
  gsf_boundary_sum #(.B4_CORNERS(1'b0), .TAG_W(TAG_W)) dut_nc (
    .clk, .rst_n, .in_valid, .in_es, .in_win, .in_tag,
    .out_valid(nc_valid), .out_es(nc_es), .out_sums(nc_sums), .out_tag(nc_tag));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(es_mode_t m, window_t w);
    int g[5];
    int d2, corners;
    logic [TAG_W-1:0] t;
    g = '{default: 0};
    corners = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        d2 = (r-2)*(r-2) + (c-2)*(c-2);
        case (d2)
          0: g[0] += int'(w[r][c]);
          1: g[1] += int'(w[r][c]);
          2: g[2] += int'(w[r][c]);
          4: g[3] += int'(w[r][c]);
          default: g[4] += int'(w[r][c]);
        endcase
        if (d2 == 8) corners += int'(w[r][c]);
      end
    if (m == ES_B1) g[2] = 0;
    if (m == ES_B1 || m == ES_B2) g[3] = 0;
    if (m != ES_B4) g[4] = 0;
    t = TAG_W'($urandom);
    @(negedge clk);
    in_valid = 1'b1; in_es = m; in_win = w; in_tag = t;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || out_es != m || out_tag != t ||
        int'(out_sums.w0) != g[0] || int'(out_sums.w1) != g[1] ||
        int'(out_sums.w2) != g[2] || int'(out_sums.w3) != g[3] ||
        int'(out_sums.w4) != g[4]) begin
      failures++;
      $display("FAIL es=%0d got %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", m,
               out_sums.w0, out_sums.w1, out_sums.w2, out_sums.w3, out_sums.w4,
               g[0], g[1], g[2], g[3], g[4]);
    end
    checks++;
    if (!nc_valid || int'(nc_sums.w4) != ((m == ES_B4) ? g[4] - corners : 0) ||
        nc_sums.w3 != out_sums.w3 || nc_sums.w0 != out_sums.w0) begin
      failures++;
      $display("FAIL no-corner instance w4=%0d exp %0d", nc_sums.w4,
               (m == ES_B4) ? g[4] - corners : 0);
    end
  endtask

  window_t w;
  initial begin
    in_valid = 1'b0; in_es = ES_B4; in_win = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // all pixels at 255 gives the widest sums
    w = '1;
    for (int m = 0; m < 4; m++) check_one(es_mode_t'(m), w);
    // one pixel set at a time shows each pixel goes to its own group
    for (int p = 0; p < 25; p++) begin
      w = '0;
      w[p/5][p%5] = 8'd200;
      check_one(ES_B4, w);
    end
    for (int i = 0; i < 3000; i++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) w[r][c] = pix_t'($urandom);
      check_one(es_mode_t'($urandom_range(3)), w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
