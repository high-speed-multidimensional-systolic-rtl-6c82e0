// md_ladder_s1s1s3: 3-D systolic ladder recursive filter, structure S1-S1-S3.
//
// The filter computes, for a raster-scanned video signal (pixel k1, line k2,
// frame k3; K x K pixels per frame, one pixel per clock),
//   y(k) = sum a(i1,i2,i3) x(k - i) + sum_{i != 0} b(i1,i2,i3) y(k - i)
// with 0 <= i1 <= N1, 0 <= i2 <= N2, 0 <= i3 <= N3, where a shift by one in
// k2 is a delay of K pixels and a shift by one in k3 a delay of K*K pixels.
//
// Structure: the filter is decomposed into three levels.  The frame level
// (k3) and the line level (k2) use the canonic direct structure S1, so there
// are exactly N3 frame registers and N2 line registers per frame tap; the
// pixel level (k1) uses the S3 ladder of two-coefficient PEs (s3_level1).
// All (N2+1)(N3+1) first-level sections sit in one linear chain: x and y
// buses run right, the partial sum runs left, and every connection is to a
// neighbour only.  Between two sections the buses pass one pixel register
// (m - p = 1) and the partial sum passes the rest of a line register,
// T2 - (m2+q2) T1, or of a frame register, T3 - (m3+q3) T1.  The pixel
// registers taken out of the line and frame registers balance those inside
// the sections, so each section sees its taps exactly K or K*K periods later
// than its left neighbour.  The longest register-to-register path is one
// multiplier and one adder; this includes the tightest recursive loop, where
// one adder forms the output node y from two registers and the b(1,0,0)
// multiplier feeds the register inside the first PE.
//
// Interface and timing: x_in is taken by every rising edge, the first edge
// after reset taking pixel (k1, k2) = (0, 0); one pixel per clock, no
// stalls.  y_out is registered: the edge that takes pixel n updates y_out
// to the filter response for pixel n - LAT, LAT = 2<N1/2> + 2.  Initial
// state is zero.  With zb_en = 0 the raster scan is treated as one long 1-D
// signal: at the left and top image borders the taps reach into the previous
// line or frame.
//
// Zero boundary (this design's own circuitry): a raster counter tags every
// input pixel with its {row, column}; the tag rides on the x bus with the
// pixel, and a copy delayed by the input latency rides on the y bus with
// the output sample it belongs to.  With zb_en = 1 every PE zeroes a product
// whose tap would carry its pixel past the image edge, so pixels outside the
// K x K image count as zero (the difference equation above then holds on
// each frame with zero boundary conditions).  zb_en is a static mode input; change it
// only under reset.
// Coefficients are programmable inputs, 12 bit two's complement with
// COEF_FRAC fractional bits; all arithmetic wraps at 16 bits.  Requires
// K >= 4(<N1/2> + 1).  b_coef[0][0][0] is ignored.
module md_ladder_s1s1s3 #(
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
  output logic signed [W-1:0]  y_out
);

  localparam int unsigned G          = (N2 + 1) * (N3 + 1);
  localparam int unsigned LINE_GAP   = ladder_pkg::line_gap(N1, K);
  localparam int unsigned FRAME_GAP  = ladder_pkg::frame_gap(N1, N2, K);
  localparam int unsigned LIN        = ladder_pkg::in_latency(N1);
  localparam int unsigned AW         = ladder_pkg::tag_w(K);

  if (K < 4 * ladder_pkg::pairs(N1)) begin : g_check
    $error("md_ladder_s1s1s3: K must be at least 4(<N1/2>+1)");
  end

  logic signed [W-1:0] xi [G], yi [G];   // buses into section g
  logic signed [W-1:0] xo [G], yo [G];   // buses out of section g
  logic signed [W-1:0] wi [G], zo [G];   // partial sums into / out of section g
  logic [2*AW-1:0]     xti [G], yti [G]; // pixel tags into section g
  logic [2*AW-1:0]     xto [G], yto [G];
  logic signed [W-1:0] y;                // output node
  logic [AW-1:0]       col, row;         // raster position of x_in

  assign y     = zo[0];
  assign xi[0] = x_in;
  assign yi[0] = y;
  assign wi[G-1] = '0;
  assign xti[0]  = {row, col};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (col == AW'(K - 1)) begin
      col <= '0;
      row <= (row == AW'(K - 1)) ? '0 : row + 1'b1;
    end else begin
      col <= col + 1'b1;
    end

  // tag of the output node sample: the input tag LIN periods earlier
  pixel_delay #(.W(2 * AW), .LEN(LIN)) u_ytag (
    .clk(clk), .rst_n(rst_n), .din(xti[0]), .dout(yti[0]));

  for (genvar g = 0; g < int'(G); g++) begin : g_sec
    localparam int unsigned I3 = g / (N2 + 1);
    localparam int unsigned I2 = g % (N2 + 1);

    s3_level1 #(
      .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .I2(I2), .K(K), .ORIGIN(g == 0)
    ) u_sec (
      .clk   (clk),
      .rst_n (rst_n),
      .zb_en (zb_en),
      .a_coef(a_coef[I3][I2]),
      .b_coef(b_coef[I3][I2]),
      .x_in  (xi[g]),
      .y_in  (yi[g]),
      .x_out (xo[g]),
      .y_out (yo[g]),
      .xt_in (xti[g]),
      .yt_in (yti[g]),
      .xt_out(xto[g]),
      .yt_out(yto[g]),
      .w_in  (wi[g]),
      .z_out (zo[g])
    );

    if (g > 0) begin : g_join
      // (m - p) T1 = one pixel register on each bus
      pixel_delay #(.W(W), .LEN(1)) u_xbus (
        .clk(clk), .rst_n(rst_n), .din(xo[g-1]), .dout(xi[g]));
      pixel_delay #(.W(W), .LEN(1)) u_ybus (
        .clk(clk), .rst_n(rst_n), .din(yo[g-1]), .dout(yi[g]));
      pixel_delay #(.W(2 * AW), .LEN(1)) u_xtag (
        .clk(clk), .rst_n(rst_n), .din(xto[g-1]), .dout(xti[g]));
      pixel_delay #(.W(2 * AW), .LEN(1)) u_ytag (
        .clk(clk), .rst_n(rst_n), .din(yto[g-1]), .dout(yti[g]));
      // rest of the line register (I2 != 0) or of the frame register (I2 == 0)
      pixel_delay #(.W(W), .LEN((I2 != 0) ? LINE_GAP : FRAME_GAP)) u_store (
        .clk(clk), .rst_n(rst_n), .din(zo[g]), .dout(wi[g-1]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y_out <= '0;
    else        y_out <= y;

endmodule
