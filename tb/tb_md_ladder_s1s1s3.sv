// tb_md_ladder_s1s1s3: end-to-end test of the 3-D ladder filter at its
// default size (N1 = 3, N2 = N3 = 1, K = 64).  Three frames of random pixels
// are filtered with random coefficients and every output sample is compared
// with the reference difference equation, including the fixed output
// latency.  The test also requires that the recursive path, the line
// register path and the frame register path each contributed at least once.
// Two filters run side by side: one in plain raster mode (zb_en = 0) and
// one in zero-boundary mode (zb_en = 1), which must have removed taps at the
// image border.
module tb_md_ladder_s1s1s3;
  localparam int unsigned N1 = 3, N2 = 1, N3 = 1, K = 64;
  localparam int unsigned NS = 3 * K * K;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [11:0] a_coef [N3+1][N2+1][N1+1], a_zb [N3+1][N2+1][N1+1];
  logic signed [11:0] b_coef [N3+1][N2+1][N1+1], b_zb [N3+1][N2+1][N1+1];
  logic signed [15:0] x, y, x_zb, y_zb;
  logic zb_en, zb_on, done, done_zb;
  int checks, failures, rec_hits, line_hits, frame_hits, border_hits;
  int checks_zb, failures_zb, rec_zb, line_zb, frame_zb, border_zb;

  always #5 clk = ~clk;

  md_ladder_s1s1s3 dut (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x), .y_out(y));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(7)) chk (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef), .x(x), .y(y),
    .done(done), .checks(checks), .failures(failures),
    .rec_hits(rec_hits), .line_hits(line_hits), .frame_hits(frame_hits),
    .border_hits(border_hits));

  md_ladder_s1s1s3 dut_zb (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_on), .a_coef(a_zb), .b_coef(b_zb),
    .x_in(x_zb), .y_out(y_zb));

  ladder_checker #(.N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED(8), .ZB(1'b1)) chk_zb (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_on), .a_coef(a_zb), .b_coef(b_zb), .x(x_zb), .y(y_zb),
    .done(done_zb), .checks(checks_zb), .failures(failures_zb),
    .rec_hits(rec_zb), .line_hits(line_zb), .frame_hits(frame_zb),
    .border_hits(border_zb));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done && done_zb);
    $display("raster mode: recursive taps active in %0d samples, line taps %0d, frame taps %0d",
             rec_hits, line_hits, frame_hits);
    $display("zero-boundary mode: recursive %0d, line %0d, frame %0d, border taps removed %0d",
             rec_zb, line_zb, frame_zb, border_zb);
    if (rec_hits == 0 || line_hits == 0 || frame_hits == 0 ||
        rec_zb == 0 || line_zb == 0 || frame_zb == 0) begin
      $display("a storage path was never exercised");
      failures++;
    end
    if (border_zb == 0 || border_hits != 0) begin
      $display("zero-boundary mode not exercised as intended");
      failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_zb, failures + failures_zb);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_zb, failures + failures_zb + 1);
    $finish;
  end
endmodule
