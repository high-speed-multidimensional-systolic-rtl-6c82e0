// tb_md_ladder_filters: end-to-end test of the five 3-D filters at
// their default size (N1 = 3, N2 = N3 = 1, K = 64), with no parameter
// overrides.
// Three frames of random pixels are filtered with random coefficients.  The
// S1-S1-S3 output is compared with the direct-form reference after its
// latency of 4 periods, the dual S1-S1-S4 output with the canonic-form
// reference after one period, and the S2-S2-S3 output with the direct-form
// reference after 4156 periods (one frame and a line, less the pixel
// registers of the chain), the S1-S1-S1 output with the direct-form
// reference at once (its register holds the response to the pixel taken on
// the same edge) and the S1-S1-S2 output with it N1 = 3 periods later.  All references are built by checkers with the
// same seed, so they see the same stimulus; the testbench also compares the
// stimulus streams every cycle.  Two copies of the design run: one in
// plain raster mode (zb_en = 0), one in zero-boundary mode (zb_en = 1), which
// must have removed taps at the image border.  Each filter must have used its
// recursive path, its line stores and its frame store.
module tb_md_ladder_filters;
  localparam int unsigned N1 = 3, N2 = 1, N3 = 1, K = 64;
  localparam int unsigned NS = 3 * K * K;
  // checkers: 0 s3 raster, 1 dual raster, 2 s3 zb, 3 dual zb, 4 s2 raster, 5 s2 zb,
  // 6 s1 raster, 7 s1 zb, 8 s1s1s2 raster, 9 s1s1s2 zb
  localparam int NCK = 10;
  localparam int LAT_S2 = int'(ladder_pkg::s2_latency(N1, N2, N3, K));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [11:0] a [NCK][N3+1][N2+1][N1+1];
  logic signed [11:0] b [NCK][N3+1][N2+1][N1+1];
  logic signed [15:0] x [NCK], y [NCK];
  logic zb [NCK], done [NCK];
  int ck [NCK], fl [NCK], rh [NCK], lh [NCK], fh [NCK], bh [NCK];
  int stim_diff = 0;

  md_ladder_filters dut (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[0]), .a_coef(a[0]), .b_coef(b[0]),
    .x_in(x[0]), .y_s3(y[0]), .y_dual(y[1]), .y_s2(y[4]), .y_s1(y[6]), .y_s12(y[8]));

  md_ladder_filters dut_zb (
    .clk(clk), .rst_n(rst_n), .zb_en(zb[2]), .a_coef(a[2]), .b_coef(b[2]),
    .x_in(x[2]), .y_s3(y[2]), .y_dual(y[3]), .y_s2(y[5]), .y_s1(y[7]), .y_s12(y[9]));

  for (genvar c = 0; c < NCK; c++) begin : g_chk
    ladder_checker #(
      .N1(N1), .N2(N2), .N3(N3), .K(K), .NS(NS), .SEED((c == 2 || c == 3 || c == 5 || c == 7 || c == 9) ? 8 : 7),
      .ZB(c == 2 || c == 3 || c == 5 || c == 7 || c == 9), .DUAL(c == 1 || c == 3),
      .LATO((c >= 8) ? int'(N1) : (c >= 6) ? 0 : (c >= 4) ? LAT_S2 : -1)
    ) u_chk (
      .clk(clk), .rst_n(rst_n), .zb_en(zb[c]), .a_coef(a[c]), .b_coef(b[c]), .x(x[c]),
      .y(y[c]), .done(done[c]), .checks(ck[c]), .failures(fl[c]), .rec_hits(rh[c]),
      .line_hits(lh[c]), .frame_hits(fh[c]), .border_hits(bh[c]));
  end

  // the dual checkers must generate exactly the stimulus that drives the design
  always @(posedge clk)
    if (rst_n && (x[1] !== x[0] || x[3] !== x[2] || a[1] != a[0] || b[1] != b[0] ||
                  a[3] != a[2] || b[3] != b[2] || zb[1] !== zb[0] || zb[3] !== zb[2] ||
                  x[4] !== x[0] || x[5] !== x[2] || a[4] != a[0] || b[4] != b[0] ||
                  a[5] != a[2] || b[5] != b[2] || zb[4] !== zb[0] || zb[5] !== zb[2] ||
                  x[6] !== x[0] || x[7] !== x[2] || a[6] != a[0] || b[6] != b[0] ||
                  a[7] != a[2] || b[7] != b[2] || zb[6] !== zb[0] || zb[7] !== zb[2] ||
                  x[8] !== x[0] || x[9] !== x[2] || a[8] != a[0] || b[8] != b[0] ||
                  a[9] != a[2] || b[9] != b[2] || zb[8] !== zb[0] || zb[9] !== zb[2]))
      stim_diff++;

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7] &&
          done[8] && done[9]);
    checks = 0; failures = 0;
    for (int c = 0; c < NCK; c++) begin
      $display("%s %s: checks %0d failures %0d, recursive %0d line %0d frame %0d border %0d",
               (c >= 8) ? "S1-S1-S2     " : (c >= 6) ? "S1-S1-S1     " : (c >= 4) ? "S2-S2-S3     " :
               (c % 2 == 1) ? "dual S1-S1-S4" : "S1-S1-S3     ",
               (c == 2 || c == 3 || c == 5 || c == 7 || c == 9) ? "zero-boundary" : "raster       ",
               ck[c], fl[c], rh[c], lh[c], fh[c], bh[c]);
      checks += ck[c];
      failures += fl[c];
      if (rh[c] == 0 || lh[c] == 0 || fh[c] == 0) begin
        $display("a storage path was never exercised");
        failures++;
      end
    end
    if (bh[2] == 0 || bh[3] == 0 || bh[5] == 0 || bh[7] == 0 || bh[9] == 0 ||
        bh[0] != 0 || bh[1] != 0 || bh[4] != 0 || bh[6] != 0 || bh[8] != 0) begin
      $display("zero-boundary mode not exercised as intended");
      failures++;
    end
    if (stim_diff != 0) begin
      $display("stimulus streams differ in %0d cycles", stim_diff);
      failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + LAT_S2 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
