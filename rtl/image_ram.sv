// image_ram: on-chip image memory. An image of IMG_W x IMG_H pixels is held
// as a vector of DEPTH words; the pixel at row r, column c is at address
// ADDR = r*IMG_W + c and its grey level is DATA.
//
// One write port, used by the host to load an image (ADDR/DATA), and one read
// port, used by the filter. The read is synchronous: rd_data holds the word of
// rd_addr in the clock after rd_en, and keeps it otherwise. A write and a read
// of the same address in one clock return the old word. The port split and
// read latency are this design's choices; the memory is written as an array so
// that synthesis maps it to block RAM.
module image_ram #(
  parameter int unsigned DEPTH  = 512 * 512,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
