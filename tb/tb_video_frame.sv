// tb_video_frame: the default filter order (N1 = 3, N2 = N3 = 1) at video
// frame sizes: K = 720 pixels per line (the active line of 13.5 MHz
// component digital video) and K = 960 (the 18 MHz wide-screen line), so
// 720 x 720 and 960 x 960 frame stores.  Two full frames and a few lines are
// filtered by each, in zero-boundary mode, with random coefficients, by both
// structures of md_ladder_filters.  The S1-S1-S3 output is compared sample by
// sample with the direct-form reference, the dual S1-S1-S4 output with the
// canonic-form reference, the S2-S2-S3 output with the direct-form
// reference delayed by its frame-and-line latency, the S1-S1-S1 output
// with the undelayed direct-form reference and the S1-S1-S2 output with it
// N1 periods later (each built by its own
// checker with the same seed, whose stimulus must equal the one driving the
// design); the line and frame store paths must have been exercised.
module tb_video_frame;
  localparam int unsigned N1 = 3, N2 = 1, N3 = 1, K = 720, KW = 960;
  localparam int unsigned NS = 2 * K * K + 4 * K;
  localparam int unsigned NSW = 2 * KW * KW + 4 * KW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [11:0] a_coef [N3+1][N2+1][N1+1];
  logic signed [11:0] b_coef [N3+1][N2+1][N1+1];
  logic signed [15:0] x, y;
  logic zb_en, done;
  int checks, failures, rec_hits, line_hits, frame_hits, border_hits;
  logic signed [11:0] a_w [N3+1][N2+1][N1+1];
  logic signed [11:0] b_w [N3+1][N2+1][N1+1];
  logic signed [15:0] x_w, y_w;
  logic zb_w, done_w;
  int checks_w, failures_w, rec_w, line_w, frame_w, border_w;
  // dual-structure outputs and their checkers (stimulus outputs unused)
  logic signed [15:0] yd, yd_w, xd, xd_w;
  logic signed [11:0] ad [N3+1][N2+1][N1+1], bd [N3+1][N2+1][N1+1];
  logic signed [11:0] ad_w [N3+1][N2+1][N1+1], bd_w [N3+1][N2+1][N1+1];
  logic zbd, zbd_w, done_d, done_dw;
  int ck_d, fl_d, rh_d, lh_d, fh_d, bh_d, ck_dw, fl_dw, rh_dw, lh_dw, fh_dw, bh_dw;
  // S2-S2-S3 outputs and their checkers
  localparam int LS = int'(ladder_pkg::s2_latency(N1, N2, N3, K));
  localparam int LSW = int'(ladder_pkg::s2_latency(N1, N2, N3, KW));
  logic signed [15:0] ys, ys_w, xs, xs_w;
  logic signed [11:0] as_ [N3+1][N2+1][N1+1], bs [N3+1][N2+1][N1+1];
  logic signed [11:0] as_w [N3+1][N2+1][N1+1], bs_w [N3+1][N2+1][N1+1];
  logic zbs, zbs_w, done_s, done_sw;
  int ck_s, fl_s, rh_s, lh_s, fh_s, bh_s, ck_sw, fl_sw, rh_sw, lh_sw, fh_sw, bh_sw;
  // S1-S1-S1 outputs and their checkers
  logic signed [15:0] y1, y1_w, x1, x1_w;
  logic signed [11:0] a1 [N3+1][N2+1][N1+1], b1 [N3+1][N2+1][N1+1];
  logic signed [11:0] a1_w [N3+1][N2+1][N1+1], b1_w [N3+1][N2+1][N1+1];
  logic zb1, zb1_w, done_1, done_1w;
  int ck_1, fl_1, rh_1, lh_1, fh_1, bh_1, ck_1w, fl_1w, rh_1w, lh_1w, fh_1w, bh_1w;
  // S1-S1-S2 outputs and their checkers
  logic signed [15:0] y2, y2_w, x2, x2_w;
  logic signed [11:0] a2 [N3+1][N2+1][N1+1], b2 [N3+1][N2+1][N1+1];
  logic signed [11:0] a2_w [N3+1][N2+1][N1+1], b2_w [N3+1][N2+1][N1+1];
  logic zb2, zb2_w, done_2, done_2w;
  int ck_2, fl_2, rh_2, lh_2, fh_2, bh_2, ck_2w, fl_2w, rh_2w, lh_2w, fh_2w, bh_2w;
  int stim_diff = 0;

  always #5 clk = ~clk;

  md_ladder_filters #(.K(K)) dut (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x), .y_s3(y), .y_dual(yd), .y_s2(ys), .y_s1(y1), .y_s12(y2));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(21), .ZB(1'b1)) chk (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef), .x(x), .y(y),
    .done(done), .checks(checks), .failures(failures),
    .rec_hits(rec_hits), .line_hits(line_hits), .frame_hits(frame_hits),
    .border_hits(border_hits));

  md_ladder_filters #(.K(KW)) dut_w (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_w), .a_coef(a_w), .b_coef(b_w),
    .x_in(x_w), .y_s3(y_w), .y_dual(yd_w), .y_s2(ys_w), .y_s1(y1_w), .y_s12(y2_w));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(KW), .NS(NSW), .SEED(22), .ZB(1'b1)) chk_w (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_w), .a_coef(a_w), .b_coef(b_w), .x(x_w), .y(y_w),
    .done(done_w), .checks(checks_w), .failures(failures_w),
    .rec_hits(rec_w), .line_hits(line_w), .frame_hits(frame_w),
    .border_hits(border_w));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(21), .ZB(1'b1), .DUAL(1'b1)) chk_d (
    .clk(clk), .rst_n(rst_n), .zb_en(zbd), .a_coef(ad), .b_coef(bd), .x(xd), .y(yd),
    .done(done_d), .checks(ck_d), .failures(fl_d), .rec_hits(rh_d), .line_hits(lh_d),
    .frame_hits(fh_d), .border_hits(bh_d));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(KW), .NS(NSW), .SEED(22), .ZB(1'b1), .DUAL(1'b1)) chk_dw (
    .clk(clk), .rst_n(rst_n), .zb_en(zbd_w), .a_coef(ad_w), .b_coef(bd_w), .x(xd_w), .y(yd_w),
    .done(done_dw), .checks(ck_dw), .failures(fl_dw), .rec_hits(rh_dw), .line_hits(lh_dw),
    .frame_hits(fh_dw), .border_hits(bh_dw));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(21), .ZB(1'b1), .LATO(LS)) chk_s (
    .clk(clk), .rst_n(rst_n), .zb_en(zbs), .a_coef(as_), .b_coef(bs), .x(xs), .y(ys),
    .done(done_s), .checks(ck_s), .failures(fl_s), .rec_hits(rh_s), .line_hits(lh_s),
    .frame_hits(fh_s), .border_hits(bh_s));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(KW), .NS(NSW), .SEED(22), .ZB(1'b1), .LATO(LSW)) chk_sw (
    .clk(clk), .rst_n(rst_n), .zb_en(zbs_w), .a_coef(as_w), .b_coef(bs_w), .x(xs_w), .y(ys_w),
    .done(done_sw), .checks(ck_sw), .failures(fl_sw), .rec_hits(rh_sw), .line_hits(lh_sw),
    .frame_hits(fh_sw), .border_hits(bh_sw));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(21), .ZB(1'b1), .LATO(0)) chk_1 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb1), .a_coef(a1), .b_coef(b1), .x(x1), .y(y1),
    .done(done_1), .checks(ck_1), .failures(fl_1), .rec_hits(rh_1), .line_hits(lh_1),
    .frame_hits(fh_1), .border_hits(bh_1));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(KW), .NS(NSW), .SEED(22), .ZB(1'b1), .LATO(0)) chk_1w (
    .clk(clk), .rst_n(rst_n), .zb_en(zb1_w), .a_coef(a1_w), .b_coef(b1_w), .x(x1_w), .y(y1_w),
    .done(done_1w), .checks(ck_1w), .failures(fl_1w), .rec_hits(rh_1w), .line_hits(lh_1w),
    .frame_hits(fh_1w), .border_hits(bh_1w));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(21), .ZB(1'b1), .LATO(N1)) chk_2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb2), .a_coef(a2), .b_coef(b2), .x(x2), .y(y2),
    .done(done_2), .checks(ck_2), .failures(fl_2), .rec_hits(rh_2), .line_hits(lh_2),
    .frame_hits(fh_2), .border_hits(bh_2));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(KW), .NS(NSW), .SEED(22), .ZB(1'b1), .LATO(N1)) chk_2w (
    .clk(clk), .rst_n(rst_n), .zb_en(zb2_w), .a_coef(a2_w), .b_coef(b2_w), .x(x2_w), .y(y2_w),
    .done(done_2w), .checks(ck_2w), .failures(fl_2w), .rec_hits(rh_2w), .line_hits(lh_2w),
    .frame_hits(fh_2w), .border_hits(bh_2w));

  always @(posedge clk)
    if (rst_n && (x2 !== x || x2_w !== x_w || a2 != a_coef || b2 != b_coef ||
                  a2_w != a_w || b2_w != b_w || zb2 !== zb_en || zb2_w !== zb_w ||
x1 !== x || x1_w !== x_w || a1 != a_coef || b1 != b_coef ||
                  a1_w != a_w || b1_w != b_w || zb1 !== zb_en || zb1_w !== zb_w ||
xd !== x || xd_w !== x_w || ad != a_coef || bd != b_coef ||
                  ad_w != a_w || bd_w != b_w || xs !== x || xs_w !== x_w ||
                  as_ != a_coef || bs != b_coef || as_w != a_w || bs_w != b_w ||
                  zbd !== zb_en || zbd_w !== zb_w || zbs !== zb_en || zbs_w !== zb_w))
      stim_diff++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done && done_w && done_d && done_dw && done_s && done_sw && done_1 && done_1w &&
          done_2 && done_2w);
    $display("K=%0d: recursive %0d, line %0d, frame %0d, border taps removed %0d",
             K, rec_hits, line_hits, frame_hits, border_hits);
    $display("K=%0d: recursive %0d, line %0d, frame %0d, border taps removed %0d",
             KW, rec_w, line_w, frame_w, border_w);
    if (rec_hits == 0 || line_hits == 0 || frame_hits == 0 || border_hits == 0) failures++;
    if (rec_w == 0 || line_w == 0 || frame_w == 0 || border_w == 0) failures++;
    $display("dual, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             K, ck_d, fl_d, lh_d, fh_d, bh_d);
    $display("dual, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             KW, ck_dw, fl_dw, lh_dw, fh_dw, bh_dw);
    if (rh_d == 0 || lh_d == 0 || fh_d == 0 || bh_d == 0) failures++;
    if (rh_dw == 0 || lh_dw == 0 || fh_dw == 0 || bh_dw == 0) failures++;
    $display("S2-S2-S3, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             K, ck_s, fl_s, lh_s, fh_s, bh_s);
    $display("S2-S2-S3, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             KW, ck_sw, fl_sw, lh_sw, fh_sw, bh_sw);
    if (rh_s == 0 || lh_s == 0 || fh_s == 0 || bh_s == 0) failures++;
    if (rh_sw == 0 || lh_sw == 0 || fh_sw == 0 || bh_sw == 0) failures++;
    $display("S1-S1-S1, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             K, ck_1, fl_1, lh_1, fh_1, bh_1);
    $display("S1-S1-S1, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             KW, ck_1w, fl_1w, lh_1w, fh_1w, bh_1w);
    if (rh_1 == 0 || lh_1 == 0 || fh_1 == 0 || bh_1 == 0) failures++;
    if (rh_1w == 0 || lh_1w == 0 || fh_1w == 0 || bh_1w == 0) failures++;
    $display("S1-S1-S2, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             K, ck_2, fl_2, lh_2, fh_2, bh_2);
    $display("S1-S1-S2, K=%0d: checks %0d failures %0d, line %0d, frame %0d, border %0d",
             KW, ck_2w, fl_2w, lh_2w, fh_2w, bh_2w);
    if (rh_2 == 0 || lh_2 == 0 || fh_2 == 0 || bh_2 == 0) failures++;
    if (rh_2w == 0 || lh_2w == 0 || fh_2w == 0 || bh_2w == 0) failures++;
    if (stim_diff != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + checks_w + ck_d + ck_dw + ck_s + ck_sw + ck_1 + ck_1w + ck_2 + ck_2w,
             failures + failures_w + fl_d + fl_dw + fl_s + fl_sw + fl_1 + fl_1w + fl_2 + fl_2w);
    $finish;
  end

  initial begin
    repeat (NSW + LSW + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_w, failures + failures_w + 1);
    $finish;
  end
endmodule
