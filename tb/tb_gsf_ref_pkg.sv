// tb_gsf_ref_pkg: reference model used by the end-to-end filter testbenches.
// It works from the coefficient of each pixel rather than from the
// hardware's shift/add structure: a pixel at squared distance d2 from the
// centre weighs 40 (d2=0), 24 (d2=1), 16 (d2=2), 5 (d2=4) or 3 (d2=5, and
// d2=8 for the corners) /256 in the full kernel; mode 0 uses 80 and 48 /256
// for the centre and its four neighbours. The sum is floored and limited
// to 255. It also gives the exact Gaussian 5x5 kernel (41,26,16,7,4,1)/273,
// rounded, to measure how far each mode departs from it.
package tb_gsf_ref_pkg;

  typedef byte unsigned img_t[];

  // unclipped weighted sum times 256 for the window centred at (r,c)
  function automatic int ref_acc(const ref img_t img, input int w, input int r,
                                 input int c, input int mode);
    int acc = 0;
    for (int i = -2; i <= 2; i++)
      for (int j = -2; j <= 2; j++) begin
        int d2, k, p;
        d2 = i*i + j*j;
        p  = int'(img[(r+i)*w + (c+j)]);
        if (mode == 0) k = (d2 == 0) ? 80 : (d2 == 1) ? 48 : 0;
        else begin
          case (d2)
            0: k = 40;
            1: k = 24;
            2: k = 16;
            4: k = (mode >= 2) ? 5 : 0;
            default: k = (mode >= 3) ? 3 : 0;
          endcase
        end
        acc += k * p;
      end
    return acc;
  endfunction

  function automatic int ref_y(const ref img_t img, input int w, input int r,
                               input int c, input int mode);
    int y;
    y = ref_acc(img, w, r, c, mode) / 256;
    return (y > 255) ? 255 : y;
  endfunction

  function automatic int gauss_y(const ref img_t img, input int w, input int r,
                                 input int c);
    int acc = 0;
    for (int i = -2; i <= 2; i++)
      for (int j = -2; j <= 2; j++) begin
        int d2, k;
        d2 = i*i + j*j;
        case (d2)
          0: k = 41;
          1: k = 26;
          2: k = 16;
          4: k = 7;
          5: k = 4;
          default: k = 1;
        endcase
        acc += k * int'(img[(r+i)*w + (c+j)]);
      end
    return (acc + 136) / 273;
  endfunction

  // test image: a saturated flat block, a diagonal ramp and noise
  function automatic byte unsigned test_pixel(input int r, input int c, input int w,
                                              input int h);
    if (r < h/3 && c < w/3) return 8'd255;
    if (r >= 2*h/3)         return 8'($urandom);
    return 8'((r * 255) / h + (c * 97) / w + ($urandom_range(7)));
  endfunction

endpackage
