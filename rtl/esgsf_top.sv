// esgsf_top: energy-scalable 5x5 Gaussian smoothing filter (ES-GSF) for
// grey-level images held in on-chip memory.
//
// Data flow, one pixel per clock:
//   host --ADDR/DATA--> image_ram --> gsf_frame_seq (raster read)
//        --> gsf_window (5x5 sub-matrix) --> gsf_boundary_sum (w0..w4)
//        --> esgsf_datapath (shift/add weights, ES multiplexer) --> out_*
// The host loads an IMG_W x IMG_H image through wr_en/wr_addr/wr_data
// (address r*IMG_W + c) and pulses start. The filter then streams out one
// smoothed pixel per clock for every centre that has a full 5x5 window,
// i.e. rows and columns 2 .. size-3, with its address. es selects the kernel
// (0: centre+B1, 1: +B2, 2: +B3, 3: +B4, see gsf_pkg); it is sampled per
// window as it enters the boundary-sum stage and reported with each result
// on out_es, so it may change at any time, also inside a frame.
//
// Timing: the clock edge that samples start is edge 0; address a is read at
// edge a+1, and the result whose window ends at that pixel (centre two rows
// and two columns back) is registered at edge a+4 (window, sum and datapath
// registers follow the memory read). frame_done is high after edge
// IMG_W*IMG_H + 3, with the last result. busy is high from the
// clock after start until frame_done. Writing the memory during a frame is
// not supported.
//
// The memory interface, the sequencer, the border policy and all timing are
// this design's choices; the grouping into boundaries and the shift/add
// datapath follow the ES-GSF architecture.
module esgsf_top
  import gsf_pkg::*;
#(
  parameter int unsigned IMG_W      = 512,
  parameter int unsigned IMG_H      = 512,
  parameter int unsigned FRAC_W     = 8,
  parameter bit          B4_CORNERS = 1'b1,
  localparam int unsigned AW        = $clog2(IMG_W * IMG_H),
  localparam int unsigned CW        = $clog2(IMG_W),
  localparam int unsigned RW        = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host image load
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [PIX_W-1:0] wr_data,
  // control
  input  logic             start,
  input  logic [1:0]       es,
  output logic             busy,
  output logic             frame_done,
  // smoothed pixel stream
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic [1:0]       out_es,
  output logic [AW-1:0]    out_addr,
  output logic [RW-1:0]    out_row,
  output logic [CW-1:0]    out_col
);

  localparam int unsigned TAG_W = 1 + RW + CW;

  typedef struct packed {
    logic          last;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
  } tag_t;

  // memory / sequencer
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  pix_t          rd_data;
  logic          pix_valid, pix_sof, pix_last, seq_busy, seq_done;

  // window
  logic          win_valid, win_last;
  window_t       win;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  tag_t          win_tag;

  // sums
  logic          sum_valid;
  es_mode_t      sum_es;
  gsums_t        sums;
  tag_t          sum_tag;

  // result
  logic          y_valid;
  es_mode_t      y_es;
  pix_t          y;
  tag_t          y_tag;

  image_ram #(.DEPTH(IMG_W * IMG_H), .DATA_W(PIX_W)) u_ram (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  gsf_frame_seq #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .pix_valid (pix_valid),
    .pix_sof   (pix_sof),
    .pix_last  (pix_last),
    .busy      (seq_busy),
    .done      (seq_done)
  );

  gsf_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pix_valid),
    .in_sof    (pix_sof),
    .in_last   (pix_last),
    .in_pix    (rd_data),
    .out_valid (win_valid),
    .out_win   (win),
    .out_row   (win_row),
    .out_col   (win_col),
    .out_last  (win_last)
  );

  assign win_tag = '{last: win_last, row: win_row, col: win_col};

  gsf_boundary_sum #(.B4_CORNERS(B4_CORNERS), .TAG_W(TAG_W)) u_sum (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (win_valid),
    .in_es     (es_mode_t'(es)),
    .in_win    (win),
    .in_tag    (win_tag),
    .out_valid (sum_valid),
    .out_es    (sum_es),
    .out_sums  (sums),
    .out_tag   (sum_tag)
  );

  esgsf_datapath #(.FRAC_W(FRAC_W), .TAG_W(TAG_W)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sum_valid),
    .in_es     (sum_es),
    .in_sums   (sums),
    .in_tag    (sum_tag),
    .out_valid (y_valid),
    .out_es    (y_es),
    .out_y     (y),
    .out_tag   (y_tag)
  );

  // busy covers the sequencer and the three pipeline stages behind it
  logic [2:0] drain;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drain <= '0;
    else        drain <= {drain[1:0], seq_done};
  end

  assign busy       = seq_busy || (|drain);
  assign frame_done = y_valid && y_tag.last;
  assign out_valid  = y_valid;
  assign out_pix    = y;
  assign out_es     = y_es;
  assign out_row    = y_tag.row;
  assign out_col    = y_tag.col;
  assign out_addr   = AW'(y_tag.row) * AW'(IMG_W) + AW'(y_tag.col);

  // the sequencer reads only while it is busy
  a_rd_in_frame: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> seq_busy);
  // the last result comes exactly three clocks after the last pixel left memory
  a_done_timing: assert property (@(posedge clk) disable iff (!rst_n) seq_done |-> ##3 frame_done);

endmodule
