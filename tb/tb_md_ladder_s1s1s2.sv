// tb_md_ladder_s1s1s2: runs the S1-S1-S2 filter (one chain of one-multiplier
// PEs with shortened line and frame registers) against the direct-form
// reference of the 3-D difference equation (products keep bits [10 +: 16],
// sums wrap at 16 bits) at several orders and frame sizes:
//   - the default order N1 = 3, N2 = N3 = 1, K = 64, three frames, with and
//     without the zero boundary,
//   - an even N1 with two line taps and no frame tap (N1 = 2, N2 = 2, K = 10),
//   - a higher order with two frame taps (N1 = 5, N2 = 1, N3 = 2, K = 14),
//   - the 1-D filter alone (N1 = 3, N2 = N3 = 0, K = 8),
//   - the smallest frame for N1 = 1 (K = 5) with N2 = 2, N3 = 1.
// The output must match the reference N1 periods later (the chain's
// registers in front of the output) and be zero before it; each
// configuration must exercise the recursive, line and frame taps it has.
module tb_md_ladder_s1s1s2;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 6;
  logic done [NC];
  int ck [NC], fl [NC], rh [NC], lh [NC], fh [NC], bh [NC];
  logic zb [NC];

  // configuration 0: N1 = 3, N2 = 1, N3 = 1, K = 64
  localparam int LAT0 = 3;
  logic signed [11:0] a0 [2][2][4], b0 [2][2][4];
  logic signed [15:0] x0, y0;
  md_ladder_s1s1s2 #(.N1(3), .N2(1), .N3(1), .K(64)) d0 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[0]), .a_coef(a0), .b_coef(b0), .x_in(x0), .y_out(y0));
  ladder_checker #(.N1(3), .N2(1), .N3(1), .K(64), .NS(12288), .SEED(31), .ZB(1'b0), .LATO(LAT0)) c0 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[0]), .a_coef(a0), .b_coef(b0), .x(x0), .y(y0), .done(done[0]),
    .checks(ck[0]), .failures(fl[0]), .rec_hits(rh[0]), .line_hits(lh[0]), .frame_hits(fh[0]),
    .border_hits(bh[0]));

  // configuration 1: N1 = 3, N2 = 1, N3 = 1, K = 64, zero boundary
  localparam int LAT1 = 3;
  logic signed [11:0] a1 [2][2][4], b1 [2][2][4];
  logic signed [15:0] x1, y1;
  md_ladder_s1s1s2 #(.N1(3), .N2(1), .N3(1), .K(64)) d1 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[1]), .a_coef(a1), .b_coef(b1), .x_in(x1), .y_out(y1));
  ladder_checker #(.N1(3), .N2(1), .N3(1), .K(64), .NS(12288), .SEED(32), .ZB(1'b1), .LATO(LAT1)) c1 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[1]), .a_coef(a1), .b_coef(b1), .x(x1), .y(y1), .done(done[1]),
    .checks(ck[1]), .failures(fl[1]), .rec_hits(rh[1]), .line_hits(lh[1]), .frame_hits(fh[1]),
    .border_hits(bh[1]));

  // configuration 2: N1 = 2, N2 = 2, N3 = 0, K = 10, zero boundary
  localparam int LAT2 = 2;
  logic signed [11:0] a2 [1][3][3], b2 [1][3][3];
  logic signed [15:0] x2, y2;
  md_ladder_s1s1s2 #(.N1(2), .N2(2), .N3(0), .K(10)) d2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[2]), .a_coef(a2), .b_coef(b2), .x_in(x2), .y_out(y2));
  ladder_checker #(.N1(2), .N2(2), .N3(0), .K(10), .NS(400), .SEED(33), .ZB(1'b1), .LATO(LAT2)) c2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[2]), .a_coef(a2), .b_coef(b2), .x(x2), .y(y2), .done(done[2]),
    .checks(ck[2]), .failures(fl[2]), .rec_hits(rh[2]), .line_hits(lh[2]), .frame_hits(fh[2]),
    .border_hits(bh[2]));

  // configuration 3: N1 = 5, N2 = 1, N3 = 2, K = 14, zero boundary
  localparam int LAT3 = 5;
  logic signed [11:0] a3 [3][2][6], b3 [3][2][6];
  logic signed [15:0] x3, y3;
  md_ladder_s1s1s2 #(.N1(5), .N2(1), .N3(2), .K(14)) d3 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[3]), .a_coef(a3), .b_coef(b3), .x_in(x3), .y_out(y3));
  ladder_checker #(.N1(5), .N2(1), .N3(2), .K(14), .NS(632), .SEED(34), .ZB(1'b1), .LATO(LAT3)) c3 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[3]), .a_coef(a3), .b_coef(b3), .x(x3), .y(y3), .done(done[3]),
    .checks(ck[3]), .failures(fl[3]), .rec_hits(rh[3]), .line_hits(lh[3]), .frame_hits(fh[3]),
    .border_hits(bh[3]));

  // configuration 4: N1 = 3, N2 = 0, N3 = 0, K = 8
  localparam int LAT4 = 3;
  logic signed [11:0] a4 [1][1][4], b4 [1][1][4];
  logic signed [15:0] x4, y4;
  md_ladder_s1s1s2 #(.N1(3), .N2(0), .N3(0), .K(8)) d4 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[4]), .a_coef(a4), .b_coef(b4), .x_in(x4), .y_out(y4));
  ladder_checker #(.N1(3), .N2(0), .N3(0), .K(8), .NS(400), .SEED(35), .ZB(1'b0), .LATO(LAT4)) c4 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[4]), .a_coef(a4), .b_coef(b4), .x(x4), .y(y4), .done(done[4]),
    .checks(ck[4]), .failures(fl[4]), .rec_hits(rh[4]), .line_hits(lh[4]), .frame_hits(fh[4]),
    .border_hits(bh[4]));

  // configuration 5: N1 = 1, N2 = 2, N3 = 1, K = 5, zero boundary
  localparam int LAT5 = 1;
  logic signed [11:0] a5 [2][3][2], b5 [2][3][2];
  logic signed [15:0] x5, y5;
  md_ladder_s1s1s2 #(.N1(1), .N2(2), .N3(1), .K(5)) d5 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[5]), .a_coef(a5), .b_coef(b5), .x_in(x5), .y_out(y5));
  ladder_checker #(.N1(1), .N2(2), .N3(1), .K(5), .NS(300), .SEED(36), .ZB(1'b1), .LATO(LAT5)) c5 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[5]), .a_coef(a5), .b_coef(b5), .x(x5), .y(y5), .done(done[5]),
    .checks(ck[5]), .failures(fl[5]), .rec_hits(rh[5]), .line_hits(lh[5]), .frame_hits(fh[5]),
    .border_hits(bh[5]));

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin
      $display("config %0d: checks %0d failures %0d, recursive %0d line %0d frame %0d border %0d",
               i, ck[i], fl[i], rh[i], lh[i], fh[i], bh[i]);
      checks += ck[i];
      failures += fl[i];
      if (rh[i] == 0) failures++;
    end
    if (lh[0] == 0 || lh[1] == 0 || lh[2] == 0 || lh[3] == 0 || lh[5] == 0) failures++;
    if (fh[0] == 0 || fh[1] == 0 || fh[3] == 0 || fh[5] == 0) failures++;
    if (bh[1] == 0 || bh[2] == 0 || bh[3] == 0 || bh[5] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
