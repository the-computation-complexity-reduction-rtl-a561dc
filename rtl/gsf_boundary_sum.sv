// gsf_boundary_sum: adds the pixels of a 5x5 window that share one Gaussian
// coefficient, so that each coefficient has to be applied only once.
//
// Coefficients fall off from the centre towards the edges of the window and
// are equal on each boundary around the centre. With win[r][c] holding C(r+1)(c+1):
//   w0 = C33                                   centre
//   w1 = C23 + C32 + C34 + C43                 boundary B1 (4-neighbours)
//   w2 = C22 + C24 + C42 + C44                 boundary B2 (diagonals)
//   w3 = C13 + C31 + C35 + C53                 boundary B3 (two steps out)
//   w4 = C12 + C14 + C21 + C25 + C41 + C45 + C52 + C54
//        (+ C11 + C15 + C51 + C55 when B4_CORNERS = 1)   boundary B4
// The centre/boundary grouping follows the kernel figure of the design. Which
// boundary the four corner pixels belong to is this design's reading: with
// B4_CORNERS = 1 the full-size kernel has a gain of exactly one.
//
// Energy scaling (own choice): the sums of the boundaries that the selected
// mode does not use are forced to zero (operand isolation), so the adders of
// B2..B4 do not toggle when a cheaper kernel is selected. The mode is sampled
// with the window and passed on with the sums.
//
// Timing: one register stage; out_* follow in_* by one clock, one window per
// clock.
module gsf_boundary_sum
  import gsf_pkg::*;
#(
  parameter bit          B4_CORNERS = 1'b1, // corner pixels belong to B4
  parameter int unsigned TAG_W      = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  es_mode_t         in_es,
  input  window_t          in_win,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output es_mode_t         out_es,
  output gsums_t           out_sums,
  output logic [TAG_W-1:0] out_tag
);

  gsums_t sums;
  logic   en2, en3, en4;

  always_comb begin
    en2 = (in_es != ES_B1);
    en3 = (in_es == ES_B3) || (in_es == ES_B4);
    en4 = (in_es == ES_B4);

    sums.w0 = in_win[2][2];
    sums.w1 = W1_W'(in_win[1][2]) + W1_W'(in_win[2][1])
            + W1_W'(in_win[2][3]) + W1_W'(in_win[3][2]);
    sums.w2 = W2_W'(in_win[1][1]) + W2_W'(in_win[1][3])
            + W2_W'(in_win[3][1]) + W2_W'(in_win[3][3]);
    sums.w3 = W3_W'(in_win[0][2]) + W3_W'(in_win[2][0])
            + W3_W'(in_win[2][4]) + W3_W'(in_win[4][2]);
    sums.w4 = W4_W'(in_win[0][1]) + W4_W'(in_win[0][3])
            + W4_W'(in_win[1][0]) + W4_W'(in_win[1][4])
            + W4_W'(in_win[3][0]) + W4_W'(in_win[3][4])
            + W4_W'(in_win[4][1]) + W4_W'(in_win[4][3]);
    if (B4_CORNERS)
      sums.w4 = sums.w4 + W4_W'(in_win[0][0]) + W4_W'(in_win[0][4])
                        + W4_W'(in_win[4][0]) + W4_W'(in_win[4][4]);

    if (!en2) sums.w2 = '0;
    if (!en3) sums.w3 = '0;
    if (!en4) sums.w4 = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_es    <= ES_B4;
      out_sums  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_es   <= in_es;
        out_sums <= sums;
        out_tag  <= in_tag;
      end
    end
  end

endmodule
