// md_ladder_filters: five 3-D realisations of one recursive video filter,
// side by side: three systolic ladders and the two simpler structures with
// broadcast wires they are derived from.
//
// All filters take the same raster-scanned input x_in (one pixel per
// clock, K x K pixels per frame), the same coefficient sets a(i1,i2,i3) and
// b(i1,i2,i3) and the same zero-boundary mode, and compute the 3-D
// difference equation
//   y(k) = sum a(i) x(k - i) + sum_{i != 0} b(i) y(k - i)
// with i1 <= N1, i2 <= N2, i3 <= N3:
//   - y_s3 comes from the S1-S1-S3 ladder (md_ladder_s1s1s3), which keeps the
//     direct form, with an input latency of 2<N1/2> + 2 periods;
//   - y_dual comes from the dual of the S1-S1-S4 ladder (md_ladder_dual),
//     which runs the canonic form and has an input latency of one period;
//   - y_s2 comes from the S2-S2-S3 ladder (md_ladder_s2s2s3), separate
//     nonrecursive and recursive ladders with their own line and frame
//     stores, bit-identical to y_s3 but about one frame later;
//   - y_s1 comes from the S1-S1-S1 structure (md_ladder_s1s1s1), which
//     broadcasts x and y to all taps and has no extra pixel registers; it
//     is bit-identical to y_s3 with a latency of 0 (registered output), but
//     its longest path holds two multipliers and a chain of adders;
//   - y_s12 comes from the S1-S1-S2 structure (md_ladder_s1s1s2), one chain
//     of one-multiplier PEs with broadcast x and y, bit-identical to y_s3
//     with a latency of N1 periods.
// The three ladders have a longest register-to-register path of one
// multiplier plus one adder, local connections only, and the minimum number
// of line and frame stores (twice that for S2-S2-S3); they differ in
// latency, in the number of pixel registers and multiplier-side adders, and
// in where the products are rounded (the direct form rounds the b products
// of y, the canonic form rounds both products of its state), so the dual
// output agrees with the others only to within rounding.  A design that
// needs one of them instantiates that module directly; this module carries
// all five so that they can be compared on the same stream.  The structures
// follow the published designs; putting them side by side is this design's
// choice.
module md_ladder_filters #(
  parameter int unsigned W    = ladder_pkg::DATA_W,
  parameter int unsigned CW   = ladder_pkg::COEF_W,
  parameter int unsigned FRAC = ladder_pkg::COEF_FRAC,
  parameter int unsigned N1   = 3,
  parameter int unsigned N2   = 1,
  parameter int unsigned N3   = 1,
  parameter int unsigned K    = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 zb_en,
  input  logic signed [CW-1:0] a_coef [N3+1][N2+1][N1+1],
  input  logic signed [CW-1:0] b_coef [N3+1][N2+1][N1+1],
  input  logic signed [W-1:0]  x_in,
  output logic signed [W-1:0]  y_s3,
  output logic signed [W-1:0]  y_dual,
  output logic signed [W-1:0]  y_s2,
  output logic signed [W-1:0]  y_s1,
  output logic signed [W-1:0]  y_s12
);

  md_ladder_s1s1s3 #(
    .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .N2(N2), .N3(N3), .K(K)
  ) u_s3 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .y_out(y_s3));

  md_ladder_dual #(
    .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .N2(N2), .N3(N3), .K(K)
  ) u_dual (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .y_out(y_dual));

  md_ladder_s2s2s3 #(
    .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .N2(N2), .N3(N3), .K(K)
  ) u_s2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .y_out(y_s2));

  md_ladder_s1s1s1 #(
    .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .N2(N2), .N3(N3), .K(K)
  ) u_s1 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .y_out(y_s1));

  md_ladder_s1s1s2 #(
    .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .N2(N2), .N3(N3), .K(K)
  ) u_s12 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a_coef), .b_coef(b_coef),
    .x_in(x_in), .y_out(y_s12));

endmodule
