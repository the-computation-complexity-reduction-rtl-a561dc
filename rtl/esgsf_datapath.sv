// esgsf_datapath: shift-and-add weighting stage of the energy-scalable
// Gaussian smoothing filter, with the energy-scalability output multiplexer.
//
// Inputs are the five group sums of one 5x5 window: w0 (centre pixel), w1
// (the four pixels on boundary B1), w2 (B2), w3 (B3) and w4 (B4). No
// multiplier is used: every coefficient is a sum of two powers of two,
//   a0 = w0 + w0/4              (1.25  * w0)
//   a1 = w1/2 + w1/4            (0.75  * w1)
//   a3 = w3/8 + w3/32           (0.15625 * w3)
//   a4 = w4/16 + w4/32          (0.09375 * w4)
// and the partial sums are chained so that each longer kernel reuses the
// shorter one:
//   s01    = a0 + a1            -> ES=0 output  s01/4
//   s012   = s01 + w2/2         -> ES=1 output  s012/8
//   s0123  = s012 + a3          -> ES=2 output  s0123/8
//   s01234 = s012 + (a3 + a4)   -> ES=3 output  s01234/8
// For ES=3 the weights are 40,24,16,5,3 /256 per pixel of w0..w4, which add to
// exactly 1 over the 25 pixels and approximate the 5x5 kernel 41,26,16,7,4,1 /273.
// The shift/add network and the four-way selection follow the architecture
// figure of the design.
//
// Own choices: the sums are extended by FRAC_W fraction bits before shifting,
// so with the default FRAC_W = 8 no shift loses a bit and the result is the
// exact weighted sum, truncated (floored) to an integer at the output.
// FRAC_W = 0 gives plain integer shifts that truncate at every shift. The ES=0
// kernel has a gain of 17/16, so the output saturates at the largest pixel value.
//
// Timing: one register stage. in_valid/in_es/in_tag are sampled with the sums;
// out_y, out_valid, out_es and out_tag appear one clock later. One result per
// clock, no back-pressure.
module esgsf_datapath
  import gsf_pkg::*;
#(
  parameter int unsigned FRAC_W = 8,  // fraction bits kept inside the datapath
  parameter int unsigned TAG_W  = 1   // side-band carried alongside each result
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  es_mode_t         in_es,
  input  gsums_t           in_sums,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output es_mode_t         out_es,
  output pix_t             out_y,
  output logic [TAG_W-1:0] out_tag
);

  // Integer part: the largest partial sum stays below 2^(PIX_W+3); one
  // spare bit is kept.
  localparam int unsigned ACC_W = PIX_W + 4 + FRAC_W;
  typedef logic [ACC_W-1:0] acc_t;

  acc_t x0, x1, x2, x3, x4;
  acc_t a0, a1, a3, a4, t1, t3, t4;
  acc_t s01, s012, s0123, b34, s01234;
  acc_t sel;
  logic [ACC_W-FRAC_W-1:0] y_int;
  pix_t y_sat;

  always_comb begin
    x0 = acc_t'(in_sums.w0) << FRAC_W;
    x1 = acc_t'(in_sums.w1) << FRAC_W;
    x2 = acc_t'(in_sums.w2) << FRAC_W;
    x3 = acc_t'(in_sums.w3) << FRAC_W;
    x4 = acc_t'(in_sums.w4) << FRAC_W;

    a0 = x0 + (x0 >> 2);
    t1 = x1 >> 1;
    a1 = t1 + (t1 >> 1);
    t3 = x3 >> 3;
    a3 = t3 + (t3 >> 2);
    t4 = x4 >> 4;
    a4 = t4 + (t4 >> 1);

    s01    = a0 + a1;
    s012   = s01 + (x2 >> 1);
    s0123  = s012 + a3;
    b34    = a3 + a4;
    s01234 = s012 + b34;

    unique case (in_es)
      ES_B1:   sel = s01 >> 2;
      ES_B2:   sel = s012 >> 3;
      ES_B3:   sel = s0123 >> 3;
      ES_B4:   sel = s01234 >> 3;
      default: sel = s01234 >> 3;
    endcase

    y_int = (ACC_W-FRAC_W)'(sel >> FRAC_W);
    if (y_int > (ACC_W-FRAC_W)'({PIX_W{1'b1}})) y_sat = '1;
    else                                        y_sat = y_int[PIX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_es    <= ES_B4;
      out_y     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_es  <= in_es;
        out_y   <= y_sat;
        out_tag <= in_tag;
      end
    end
  end

endmodule
