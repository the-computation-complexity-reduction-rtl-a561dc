// tb_esgsf_datapath: self-checking test of the shift/add weighting stage.
// Random group sums (and the all-maximum corner case) are applied in every
// energy-scalability mode. The expected output is the integer weighted sum
// floor((80*w0 + 48*w1)/256) for mode 0 and
// floor((40*w0 + 24*w1 + 16*w2 + 5*w3 + 3*w4)/256) with the unused terms
// dropped for modes 1..3, limited to 255. The one-clock latency and the tag
// and mode side-band are checked as well. A second instance with FRAC_W = 0
// is checked against the network read as plain truncating integer shifts
// (x>>1>>1 = x/4 and so on).
module tb_esgsf_datapath;
  import gsf_pkg::*;

  localparam int TAG_W = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  es_mode_t in_es, out_es;
  gsums_t in_sums;
  logic [TAG_W-1:0] in_tag, out_tag;
  pix_t out_y;

  int checks = 0, failures = 0;
  int sat_seen = 0;

  esgsf_datapath #(.TAG_W(TAG_W)) dut (.*);

  // second instance with no fraction bits: every shift truncates
  pix_t i_y;
  logic i_valid;
  es_mode_t i_es;
  logic [TAG_W-1:0] i_tag;
  esgsf_datapath #(.FRAC_W(0), .TAG_W(TAG_W)) dut_int (
    .clk, .rst_n, .in_valid, .in_es, .in_sums, .in_tag,
    .out_valid(i_valid), .out_es(i_es), .out_y(i_y), .out_tag(i_tag));

  // integer-shift reading of the same network
  function automatic int ref_int(es_mode_t m, gsums_t s);
    int a0, a1, a3, a4, s01, s012, y;
    a0 = int'(s.w0) + (int'(s.w0) / 4);
    a1 = (int'(s.w1) / 2) + (int'(s.w1) / 4);
    a3 = (int'(s.w3) / 8) + (int'(s.w3) / 32);
    a4 = (int'(s.w4) / 16) + (int'(s.w4) / 32);
    s01 = a0 + a1;
    s012 = s01 + int'(s.w2) / 2;
    case (m)
      ES_B1:   y = s01 / 4;
      ES_B2:   y = s012 / 8;
      ES_B3:   y = (s012 + a3) / 8;
      default: y = (s012 + a3 + a4) / 8;
    endcase
    return (y > 255) ? 255 : y;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(es_mode_t m, gsums_t s);
    int acc;
    case (m)
      ES_B1:   acc = 80*int'(s.w0) + 48*int'(s.w1);
      ES_B2:   acc = 40*int'(s.w0) + 24*int'(s.w1) + 16*int'(s.w2);
      ES_B3:   acc = 40*int'(s.w0) + 24*int'(s.w1) + 16*int'(s.w2) + 5*int'(s.w3);
      default: acc = 40*int'(s.w0) + 24*int'(s.w1) + 16*int'(s.w2) + 5*int'(s.w3)
                   + 3*int'(s.w4);
    endcase
    acc = acc / 256;
    return (acc > 255) ? 255 : acc;
  endfunction

  task automatic apply(es_mode_t m, gsums_t s);
    int exp_y;
    logic [TAG_W-1:0] t;
    t = TAG_W'($urandom);
    @(negedge clk);
    in_valid = 1'b1; in_es = m; in_sums = s; in_tag = t;
    exp_y = ref_y(m, s);
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || out_y != pix_t'(exp_y) || out_es != m || out_tag != t) begin
      failures++;
      $display("FAIL es=%0d w=%0d,%0d,%0d,%0d,%0d got y=%0d v=%0b exp %0d",
               m, s.w0, s.w1, s.w2, s.w3, s.w4, out_y, out_valid, exp_y);
    end
    if (exp_y == 255 && m == ES_B1) sat_seen++;
    checks++;
    if (!i_valid || int'(i_y) != ref_int(m, s)) begin
      failures++;
      $display("FAIL FRAC_W=0 es=%0d got %0d exp %0d", m, i_y, ref_int(m, s));
    end
  endtask

  gsums_t s;
  initial begin
    in_valid = 1'b0; in_es = ES_B4; in_sums = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // flat images: a flat grey level g must give g back in mode 3
    for (int g = 0; g < 256; g += 15) begin
      s.w0 = W0_W'(g); s.w1 = W1_W'(4*g); s.w2 = W2_W'(4*g); s.w3 = W3_W'(4*g);
      s.w4 = W4_W'(12*g);
      apply(ES_B4, s);
      checks++;
      if (out_y != pix_t'(g)) begin
        failures++;
        $display("FAIL flat %0d gave %0d", g, out_y);
      end
    end
    // all-maximum sums in every mode (mode 0 saturates)
    s.w0 = '1; s.w1 = W1_W'(1020); s.w2 = W2_W'(1020); s.w3 = W3_W'(1020);
    s.w4 = W4_W'(3060);
    for (int m = 0; m < 4; m++) apply(es_mode_t'(m), s);
    // random sums within the ranges of real windows
    for (int i = 0; i < 4000; i++) begin
      s.w0 = W0_W'($urandom_range(255));
      s.w1 = W1_W'($urandom_range(1020));
      s.w2 = W2_W'($urandom_range(1020));
      s.w3 = W3_W'($urandom_range(1020));
      s.w4 = W4_W'($urandom_range(3060));
      apply(es_mode_t'($urandom_range(3)), s);
    end
    // a valid-low clock leaves out_valid low
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
