// tb_image_ram: self-checking test of the image memory. A 1024-word memory
// is filled at random addresses and read back against a shadow array; the
// one-clock read latency, the hold of rd_data while rd_en is low and
// read-before-write on a same-address collision are checked.
module tb_image_ram;

  localparam int DEPTH = 1024;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;

  logic [7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  image_ram #(.DEPTH(DEPTH), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = 8'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random reads mixed with random writes
    for (int i = 0; i < 3000; i++) begin
      int ra, wa;
      ra = $urandom_range(DEPTH-1);
      wa = ($urandom_range(3) == 0) ? ra : $urandom_range(DEPTH-1);
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(ra);
      wr_en = $urandom_range(1); wr_addr = AW'(wa); wr_data = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data != shadow[ra]) begin
        failures++; $display("FAIL read %0d got %0h exp %0h", ra, rd_data, shadow[ra]);
      end
      if (wr_en) shadow[wa] = wr_data;
      rd_en = 0; wr_en = 0;
      held = rd_data;
      @(negedge clk);
      checks++;
      if (rd_data != held) begin failures++; $display("FAIL rd_data not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
