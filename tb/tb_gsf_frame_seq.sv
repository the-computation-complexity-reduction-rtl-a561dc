// tb_gsf_frame_seq: self-checking test of the frame sequencer for a 7x5
// image. After start every address 0..34 must be read exactly once, in
// order, one per clock; pix_valid/pix_sof/pix_last must follow the read by
// one clock; done must pulse with the last pixel and busy must fall after
// it. A start while busy must be ignored, and a second frame must repeat.
module tb_gsf_frame_seq;

  localparam int W = 7;
  localparam int H = 5;
  localparam int N = W * H;
  localparam int AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, rd_en, pix_valid, pix_sof, pix_last, busy, done;
  logic [AW-1:0] rd_addr;

  int checks = 0, failures = 0;

  gsf_frame_seq #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the expected read stream
  int  next_addr;
  logic prev_rd;
  int   prev_addr;
  int   reads, dones, cycles;
  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (prev_rd) begin
      checks++;
      if (!pix_valid || pix_sof != (prev_addr == 0) || pix_last != (prev_addr == N-1) ||
          done != (prev_addr == N-1)) begin
        failures++; $display("FAIL strobes after read of %0d", prev_addr);
      end
    end else begin
      checks++;
      if (pix_valid || done) begin failures++; $display("FAIL stray pix_valid"); end
    end
    if (rd_en) begin
      checks++;
      if (int'(rd_addr) != next_addr) begin
        failures++; $display("FAIL read %0d exp %0d", rd_addr, next_addr);
      end
      next_addr = (next_addr + 1) % N;
      reads++;
    end
    if (done) dones++;
    prev_rd   <= rd_en;
    prev_addr <= int'(rd_addr);
  end

  initial begin
    start = 0; next_addr = 0; reads = 0; dones = 0; cycles = 0;
    prev_rd = 0; prev_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      repeat (10) @(negedge clk);
      start = 1;                       // ignored: frame in progress
      @(negedge clk); start = 0;
      wait (done);
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
      repeat (3) @(negedge clk);
    end
    checks++;
    if (reads != 2*N || dones != 2 || cycles != 2*(N+1)) begin
      failures++;
      $display("FAIL reads=%0d dones=%0d busy cycles=%0d", reads, dones, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
