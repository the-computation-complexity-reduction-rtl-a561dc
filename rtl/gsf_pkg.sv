// gsf_pkg: types and constants shared by the energy-scalable 5x5 Gaussian
// smoothing filter (ES-GSF).
//
// The filter groups the 25 coefficients of a 5x5 Gaussian kernel into a centre
// tap and four concentric boundaries B1..B4 whose coefficients are equal, adds
// the pixels of each group and weights the five sums with shifts and adds. The
// energy-scalability mode selects how many boundaries take part:
//   ES_B1 : centre + B1                (plus-shaped 3x3 kernel)
//   ES_B2 : centre + B1 + B2           (full 3x3 kernel)
//   ES_B3 : centre + B1 + B2 + B3
//   ES_B4 : centre + B1 + B2 + B3 + B4 (full 5x5 kernel)
// The mode encoding equals the select input of the output multiplexer.
package gsf_pkg;

  // Pixel width: 8-bit grey levels, values 0..255.
  localparam int unsigned PIX_W = 8;

  // Window size of the kernel (5x5 sub-matrix).
  localparam int unsigned WIN = 5;

  typedef logic [PIX_W-1:0] pix_t;

  // A 5x5 sub-matrix; index [row][col], [2][2] is the centre pixel C33.
  typedef pix_t [WIN-1:0][WIN-1:0] window_t;

  typedef enum logic [1:0] {
    ES_B1 = 2'd0,
    ES_B2 = 2'd1,
    ES_B3 = 2'd2,
    ES_B4 = 2'd3
  } es_mode_t;

  // Widths of the five group sums: w0 is one pixel, w1..w3 four pixels,
  // w4 up to twelve pixels.
  localparam int unsigned W0_W = PIX_W;
  localparam int unsigned W1_W = PIX_W + 2;
  localparam int unsigned W2_W = PIX_W + 2;
  localparam int unsigned W3_W = PIX_W + 2;
  localparam int unsigned W4_W = PIX_W + 4;

  // The five group sums of one window.
  typedef struct packed {
    logic [W0_W-1:0] w0;
    logic [W1_W-1:0] w1;
    logic [W2_W-1:0] w2;
    logic [W3_W-1:0] w3;
    logic [W4_W-1:0] w4;
  } gsums_t;

endpackage
