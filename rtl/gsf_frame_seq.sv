// gsf_frame_seq: reads one image out of the image memory in raster order.
//
// A pulse on start (while idle) makes the sequencer issue one read per clock
// for addresses 0 .. IMG_W*IMG_H-1 and then return to idle. It delays the
// read strobe by the memory's one-clock read latency, so pix_valid, pix_sof
// (first pixel) and pix_last (last pixel) line up with the memory's rd_data.
// busy is high from the clock after start until the last pixel has left, and
// done pulses with the last pixel. A start while busy is ignored.
//
// This sequencing is this design's own: it only has to present the stored
// image to the filter as a pixel stream.
module gsf_frame_seq #(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          pix_valid,
  output logic          pix_sof,
  output logic          pix_last,
  output logic          busy,
  output logic          done
);

  localparam int unsigned NPIX = IMG_W * IMG_H;

  typedef enum logic {S_IDLE, S_READ} state_t;
  state_t state;
  logic [AW-1:0] addr;

  always_comb begin
    rd_en   = (state == S_READ);
    rd_addr = addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr      <= '0;
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      pix_last  <= 1'b0;
    end else begin
      pix_valid <= rd_en;
      pix_sof   <= rd_en && (addr == '0);
      pix_last  <= rd_en && (32'(addr) == NPIX-1);
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          addr  <= '0;
        end
        S_READ: begin
          if (32'(addr) == NPIX-1) begin
            state <= S_IDLE;
            addr  <= '0;
          end else begin
            addr <= addr + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_READ) || pix_valid;
  assign done = pix_last;

endmodule
