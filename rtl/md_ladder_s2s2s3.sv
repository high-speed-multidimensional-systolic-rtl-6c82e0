// md_ladder_s2s2s3: 3-D systolic ladder recursive filter, structure S2-S2-S3.
//
// It computes the 3-D difference equation of md_ladder_s1s1s3 (direct form,
// same rounding, bit-identical output) with two separate ladders instead of
// one: a nonrecursive ladder that forms u = sum a(i) x(k - i), and a
// recursive ladder that forms y = u + sum_{i != 0} b(i) y(k - i).  Each
// ladder has its own line and frame stores, so it holds twice the canonic
// number; in exchange every section of a ladder is the same kind of module
// (only b PEs or only a PEs), which suits a design whose line and frame
// stores are off-chip.  The split into two ladders, each with its own stores,
// the sections of <N1/2> + 1 two-coefficient S3 PEs (p2 = <N1/2>) and the
// coupling of the two ladders follow the published S2-S2-S3 structure; the
// exact store lengths and the resulting latency are worked out here.
//
// Both ladders chain (N2+1)(N3+1) sections in the order (i2,i3) = (0,0),
// (1,0), ..., (N2,0), (0,1), ...  A section holds NP = <N1/2> + 1 PEs
// (s3_pe) with coefficient pairs (0,1), (2,3), ...; its first PE has no
// registers.  Between sections the bus passes one pixel register and the
// partial sum the rest of a line store, K - (2 p2 + 1), or of a frame store,
// K^2 - (N2 K + 2 p2 + 1).  The nonrecursive ladder takes x_in at its first
// section and returns u there; u passes one pixel register and enters the
// far end of the recursive ladder's partial-sum path, which sits next to
// it when the two ladders are folded side by side.  The recursive ladder's
// first section lacks b(0,0,0), and its output node is y.
//
// Timing: the edge that takes pixel n loads y_out with the response to pixel
// n - LAT, LAT = ladder_pkg::s2_latency(N1, N2, N3, K) (4156 periods at the
// defaults: u crosses the whole partial-sum path of the recursive ladder).
// The longest register-to-register path is one multiplier plus one adder.
// Zero boundary (this design's own circuitry): x samples carry a {row,
// column} tag from a raster counter; the y bus tag comes from a second
// counter reset to the position the output node sample has, and the PEs zero
// products that would cross the right or bottom image edge when zb_en is
// set.  The unused bus of each s3_pe (y in the nonrecursive ladder, x in the
// recursive one) is tied to zero and removed by synthesis; the tags leaving
// the last sections are not used (reported as such).
module md_ladder_s2s2s3 #(
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

  localparam int unsigned G         = (N2 + 1) * (N3 + 1);
  localparam int unsigned NP        = ladder_pkg::pairs(N1);
  localparam int unsigned AW        = ladder_pkg::tag_w(K);
  localparam int unsigned LINE_GAP  = ladder_pkg::dual_line_gap(N1, K);
  localparam int unsigned FRAME_GAP = ladder_pkg::dual_frame_gap(N1, N2, K);
  localparam int unsigned YSTART    =
    ladder_pkg::raster_back(ladder_pkg::s2_latency(N1, N2, N3, K), K);

  if (K < 2 * NP) begin : g_check
    $error("md_ladder_s2s2s3: K must be at least 2(<N1/2> + 1)");
  end

  logic signed [W-1:0] u_r;                 // nonrecursive result, registered
  logic signed [W-1:0] u, y;                // ladder outputs (y: output node)
  logic [AW-1:0]       xcol, xrow, ycol, yrow;

  // raster positions of the x_in sample and of the output node sample
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      xcol <= '0;
      xrow <= '0;
      ycol <= AW'(YSTART % K);
      yrow <= AW'(YSTART / K);
    end else begin
      xcol <= (xcol == AW'(K - 1)) ? '0 : xcol + 1'b1;
      if (xcol == AW'(K - 1)) xrow <= (xrow == AW'(K - 1)) ? '0 : xrow + 1'b1;
      ycol <= (ycol == AW'(K - 1)) ? '0 : ycol + 1'b1;
      if (ycol == AW'(K - 1)) yrow <= (yrow == AW'(K - 1)) ? '0 : yrow + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      u_r   <= '0;
      y_out <= '0;
    end else begin
      u_r   <= u;
      y_out <= y;
    end

  // ladder 0: nonrecursive, on the x bus; ladder 1: recursive, on the y bus
  for (genvar l = 0; l < 2; l++) begin : g_ladder
    for (genvar g = 0; g < int'(G); g++) begin : g_sec
      localparam int unsigned I3 = g / (N2 + 1);
      localparam int unsigned I2 = g % (N2 + 1);

      logic signed [W-1:0] b_in, b_out;    // bus into / out of the section
      logic [2*AW-1:0]     t_in, t_out;    // its tag
      logic signed [W-1:0] s_in, z0;       // partial sum into / out of the section

      for (genvar j = 0; j < int'(NP); j++) begin : g_pe
        logic signed [CW-1:0] c1, c2;
        logic signed [W-1:0]  bi, bo, wi, zo, x_o, y_o;
        logic [2*AW-1:0]      ti, to, xt_o, yt_o;

        assign c1 = (l == 0) ? a_coef[I3][I2][2*j] : b_coef[I3][I2][2*j];
        if (2 * j + 1 <= N1) begin : g_c2
          assign c2 = (l == 0) ? a_coef[I3][I2][2*j+1] : b_coef[I3][I2][2*j+1];
        end else begin : g_c2z
          assign c2 = '0;
        end

        if (j == 0) begin : g_first
          assign bi = b_in;
          assign ti = t_in;
        end else begin : g_next
          assign bi = g_pe[j-1].bo;
          assign ti = g_pe[j-1].to;
        end
        if (j == NP - 1) begin : g_last
          assign wi = s_in;
        end else begin : g_inner
          assign wi = g_pe[j+1].zo;
        end

        s3_pe #(
          .W(W), .CW(CW), .FRAC(FRAC), .K(K), .TAP1(2 * j), .I2(I2),
          .USE_X(l == 0), .REG(j != 0), .HAS_FIRST(!(l == 1 && g == 0 && j == 0))
        ) u_pe (
          .clk     (clk),
          .rst_n   (rst_n),
          .zb_en   (zb_en),
          .c_first (c1),
          .c_second(c2),
          .x_in    ((l == 0) ? bi : '0),
          .y_in    ((l == 1) ? bi : '0),
          .xt_in   ((l == 0) ? ti : '0),
          .yt_in   ((l == 1) ? ti : '0),
          .x_out   (x_o),
          .y_out   (y_o),
          .xt_out  (xt_o),
          .yt_out  (yt_o),
          .w_in    (wi),
          .z_out   (zo)
        );
        assign bo = (l == 0) ? x_o : y_o;
        assign to = (l == 0) ? xt_o : yt_o;
      end

      assign z0    = g_pe[0].zo;
      assign b_out = g_pe[NP-1].bo;
      assign t_out = g_pe[NP-1].to;

      if (g == 0) begin : g_head
        assign b_in = (l == 0) ? x_in : y;
        assign t_in = (l == 0) ? {xrow, xcol} : {yrow, ycol};
      end else begin : g_join
        logic signed [W-1:0] st_out;
        // one pixel register on the bus and its tag
        pixel_delay #(.W(W), .LEN(1)) u_bus (
          .clk(clk), .rst_n(rst_n), .din(g_sec[g-1].b_out), .dout(b_in));
        pixel_delay #(.W(2 * AW), .LEN(1)) u_tag (
          .clk(clk), .rst_n(rst_n), .din(g_sec[g-1].t_out), .dout(t_in));
        // rest of the line store (I2 != 0) or of the frame store (I2 == 0)
        pixel_delay #(.W(W), .LEN((I2 != 0) ? LINE_GAP : FRAME_GAP)) u_store (
          .clk(clk), .rst_n(rst_n), .din(z0), .dout(st_out));
      end

      if (g == G - 1) begin : g_tail
        assign s_in = (l == 1) ? u_r : '0;
      end else begin : g_mid
        assign s_in = g_sec[g+1].g_join.st_out;
      end
    end
  end

  assign u = g_ladder[0].g_sec[0].z0;
  assign y = g_ladder[1].g_sec[0].z0;

endmodule
