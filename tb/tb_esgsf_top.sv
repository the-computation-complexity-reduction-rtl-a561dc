// tb_esgsf_top: end-to-end test of the ES-GSF filter on a 20x12 image.
// The host loads a test image (saturated flat block, ramp, noise) through
// the ADDR/DATA port, then runs frames with ES fixed at 3, 0, 1 and 2, a
// frame in which ES changes every few clocks, and a frame after loading a
// new image. Every result is compared with a coefficient-level reference
// model for the mode reported with it, every interior pixel must be
// produced exactly once and no border pixel at all, and frame_done must
// come IMG_W*IMG_H + 3 clocks after the edge that samples start. The testbench counts how often
// each mechanism occurred (each ES mode, an ES change inside a frame, output
// saturation, skipped border pixels, memory reload) and fails if one never
// did. It also prints the mean error distance and PSNR of each mode against
// the exact 5x5 Gaussian kernel.
module tb_esgsf_top;
  import gsf_pkg::*;
  import tb_gsf_ref_pkg::*;

  localparam int W = 20;
  localparam int H = 12;
  localparam int N = W * H;
  localparam int AW = $clog2(N);
  localparam int RW = $clog2(H);
  localparam int CW = $clog2(W);
  localparam int LATENCY = N + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, start, busy, frame_done, out_valid;
  logic [AW-1:0] wr_addr, out_addr;
  logic [7:0] wr_data, out_pix;
  logic [1:0] es, out_es;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;

  esgsf_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t img;
  int seen [];
  // mechanism counters
  int mode_seen [4];
  int es_changes_in_frame = 0, saturations = 0, border_skipped = 0, reloads = 0;
  int frames = 0;
  // quality against the exact Gaussian kernel
  longint err_abs [4], err_sq [4], err_n [4];
  real    sx [4], sy [4], sxx [4], syy [4], sxy [4];

  initial begin
    repeat (20 * N + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  logic [1:0] last_es;
  logic       have_last_es;
  always @(posedge clk) if (rst_n && out_valid) begin
    int r, c, m, e, g;
    r = int'(out_row); c = int'(out_col); m = int'(out_es);
    checks++;
    if (r < 2 || r > H-3 || c < 2 || c > W-3) begin
      failures++; $display("FAIL border result at %0d,%0d", r, c);
    end else begin
      e = ref_y(img, W, r, c, m);
      if (int'(out_pix) != e || int'(out_addr) != r*W + c) begin
        failures++;
        $display("FAIL (%0d,%0d) es=%0d got %0d addr %0d exp %0d", r, c, m, out_pix,
                 out_addr, e);
      end
      seen[r*W + c]++;
      mode_seen[m]++;
      if (ref_acc(img, W, r, c, m) / 256 > 255) saturations++;
      g = gauss_y(img, W, r, c);
      err_abs[m] += (e > g) ? e - g : g - e;
      err_sq[m]  += (e - g) * (e - g);
      err_n[m]++;
      sx[m] += e; sy[m] += g; sxx[m] += e*e; syy[m] += g*g; sxy[m] += e*g;
    end
    if (have_last_es && out_es != last_es && !frame_done) es_changes_in_frame++;
    last_es <= out_es;
    have_last_es <= !frame_done;
  end

  task automatic load_image();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r*W + c] = test_pixel(r, c, W, H);
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = img[a];
    end
    @(negedge clk); wr_en = 1'b0;
  endtask

  task automatic run_frame(input int mode, input bit switching);
    int t;
    int expected;
    bit done_seen;
    for (int a = 0; a < N; a++) seen[a] = 0;
    @(negedge clk);
    es = 2'(mode);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // start was sampled by the clock edge before this negedge: count the
    // edges after it up to the one that raises frame_done
    t = 0; done_seen = 0;
    while (!done_seen && t < 4 * N) begin
      if (switching && $urandom_range(5) == 0) es = 2'($urandom_range(3));
      @(posedge clk);
      t++;
      @(negedge clk);
      if (frame_done) done_seen = 1;
    end
    checks++;
    if (t != LATENCY) begin
      failures++; $display("FAIL frame took %0d clocks, expected %0d", t, LATENCY);
    end
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low before frame_done"); end
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after frame_done"); end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        expected = (r >= 2 && r <= H-3 && c >= 2 && c <= W-3) ? 1 : 0;
        checks++;
        if (seen[r*W + c] != expected) begin
          failures++; $display("FAIL pixel %0d,%0d produced %0d times", r, c, seen[r*W+c]);
        end
        if (expected == 0 && seen[r*W + c] == 0) border_skipped++;
      end
    frames++;
  endtask

  initial begin
    img = new[N];
    seen = new[N];
    mode_seen = '{default: 0};
    err_abs = '{default: 0}; err_sq = '{default: 0}; err_n = '{default: 0};
    sx = '{default: 0.0}; sy = '{default: 0.0}; sxx = '{default: 0.0};
    syy = '{default: 0.0}; sxy = '{default: 0.0};
    have_last_es = 1'b0; last_es = '0;
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; start = 1'b0; es = 2'd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_image();
    run_frame(3, 1'b0);
    run_frame(0, 1'b0);
    run_frame(1, 1'b0);
    run_frame(2, 1'b0);
    run_frame(3, 1'b1);
    load_image();
    reloads++;
    run_frame(3, 1'b0);

    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("FAIL ES mode %0d never ran", m); end
    end
    checks++;
    if (es_changes_in_frame == 0) begin failures++; $display("FAIL no ES change in a frame"); end
    checks++;
    if (saturations == 0) begin failures++; $display("FAIL no saturation"); end
    checks++;
    if (border_skipped == 0) begin failures++; $display("FAIL no border skipped"); end
    checks++;
    if (reloads == 0) begin failures++; $display("FAIL no reload"); end
    $display("mechanisms: frames=%0d modes=%0d/%0d/%0d/%0d es_changes=%0d saturations=%0d border_skipped=%0d reloads=%0d",
             frames, mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3],
             es_changes_in_frame, saturations, border_skipped, reloads);
    for (int m = 0; m < 4; m++)
      if (err_n[m] > 0) begin
        real n, mx, my, vx, vy, cxy, ssim;
        n = real'(err_n[m]);
        mx = sx[m] / n; my = sy[m] / n;
        vx = sxx[m] / n - mx*mx; vy = syy[m] / n - my*my; cxy = sxy[m] / n - mx*my;
        // global SSIM over all results of the mode, C1=(0.01*255)^2, C2=(0.03*255)^2
        ssim = ((2.0*mx*my + 6.5025) * (2.0*cxy + 58.5225)) /
               ((mx*mx + my*my + 6.5025) * (vx + vy + 58.5225));
        $display("ES=%0d vs exact Gaussian: MED=%0.3f NED=%0.5f PSNR=%0.2f dB SSIM=%0.4f", m,
                 real'(err_abs[m]) / n, real'(err_abs[m]) / n / 255.0,
                 (err_sq[m] == 0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * n / real'(err_sq[m])),
                 ssim);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
