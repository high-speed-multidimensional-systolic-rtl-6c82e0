// md_ladder_s1s1s2: 3-D recursive filter, structure S1-S1-S2.
//
// It computes the 3-D difference equation of md_ladder_s1s1s3 (direct form,
// same rounding, bit-identical output).  The first level is the 1-D
// structure S2: one chain of one-multiplier PEs, each adding its product
// into the partial sum and passing it through one pixel register toward
// the output.  Each first-level block holds the PEs b(0..N1) on the
// broadcast output bus Y and then a(0..N1) on the broadcast input bus x;
// the block for (i2,i3) = (0,0) has no b(0,0,0).  The blocks are chained in
// the order (i2,i3) = (0,0), (1,0), ..., (N2,0), (0,1), ..., and the
// partial sum passes a shortened line or frame register between them, so
// every register is on one path and the longest register-to-register path
// is one multiplier plus one adder.  x and Y stay broadcast (global wires).
//
// Register bookkeeping: counting the pixel registers from a PE to the
// output, b(i1) of the origin block sits at i1 and a(i1) at N1 + 1 + i1, so
// the output Y is the filter output delayed by N1 + 1 periods.  Each further
// block must start at its tap delay D = i2 K + i3 K^2, which makes the
// store in front of it D - D_previous - 2(N1 + 1) long: K - 2(N1 + 1) for a
// line step, K^2 - N2 K - 2(N1 + 1) for a frame step (the T2 - q2 T1 and
// T3 - q3 T1 of the published structure, with q2 = 2(N1 + 1) and
// q3 = N2 K + 2(N1 + 1)).  The chain, its order, the shortened stores with
// these q2 and q3, and the input latency of N1 + 1 periods follow the
// published S1-S1-S2 structure; the word formats, reset and zero-boundary
// gating are this design's own.
//
// Interface and timing: the ports of md_ladder_s1s1s3.  y_out is Y, the
// last pixel register of the chain: the edge that takes pixel n loads it
// with the response to pixel n - N1.  Zero boundary (own circuitry): one
// raster counter tags the x_in pixel, a second one, started N1 + 1 pixels
// back, tags the Y sample, and with zb_en set a PE drops its product when
// column + i1 >= K or row + i2 >= K.  K must be at least 2(N1 + 1) + 1
// when there are line or frame taps.
module md_ladder_s1s1s2 #(
  parameter int unsigned W    = ladder_pkg::DATA_W,
  parameter int unsigned CW   = ladder_pkg::COEF_W,
  parameter int unsigned FRAC = ladder_pkg::COEF_FRAC,
  parameter int unsigned N1   = 1,
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

  localparam int unsigned G      = (N2 + 1) * (N3 + 1);
  localparam int unsigned NB     = 2 * (N1 + 1);      // PEs per block
  localparam int unsigned AW     = ladder_pkg::tag_w(K);
  localparam int unsigned YSTART = ladder_pkg::raster_back(longint'(N1) + 1, K);

  if (G > 1 && K < NB + 1) begin : g_check
    $error("md_ladder_s1s1s2: K must be at least 2(N1 + 1) + 1");
  end

  logic [AW-1:0] xcol, xrow, ycol, yrow;   // positions of the x_in and Y samples

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

  for (genvar g = 0; g < int'(G); g++) begin : g_blk
    localparam int unsigned I3 = g / (N2 + 1);
    localparam int unsigned I2 = g % (N2 + 1);

    logic signed [W-1:0] s_end;             // partial sum entering the block's far end
    logic signed [W-1:0] s_out;             // partial sum leaving the block

    // PE j: b(j) for j <= N1, a(j - N1 - 1) above; j = 0 is nearest the output
    for (genvar j = 0; j < int'(NB); j++) begin : g_pe
      localparam bit          IS_B = (j <= int'(N1));
      localparam int unsigned I1   = IS_B ? j : j - N1 - 1;

      logic signed [W-1:0] w_in, s;         // sum from the far side / leaving this PE

      if (j == NB - 1) begin : g_far
        assign w_in = s_end;
      end else begin : g_near
        assign w_in = g_pe[j+1].s;
      end

      if (g == 0 && j == 0) begin : g_none  // no b(0,0,0): the sum passes through
        assign s = w_in;
      end else begin : g_mul
        logic signed [CW-1:0]   c;
        logic signed [W-1:0]    v, p;
        logic signed [W+CW-1:0] f;
        logic                   cut;
        logic signed [W-1:0]    r;

        assign c   = IS_B ? b_coef[I3][I2][I1] : a_coef[I3][I2][I1];
        assign v   = IS_B ? y_out : x_in;
        assign cut = zb_en && (IS_B ? (int'(ycol) + I1 >= int'(K) || int'(yrow) + I2 >= int'(K))
                                    : (int'(xcol) + I1 >= int'(K) || int'(xrow) + I2 >= int'(K)));
        assign f   = v * c;
        assign p   = cut ? '0 : f[FRAC +: W];
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n) r <= '0;
          else        r <= w_in + p;
        assign s = r;
      end
    end
    assign s_out = g_pe[0].s;

    if (g == G - 1) begin : g_last
      assign s_end = '0;
    end else begin : g_store
      localparam int unsigned LEN = (((g + 1) % (N2 + 1)) != 0) ? K - NB : K * K - N2 * K - NB;
      pixel_delay #(.W(W), .LEN(LEN)) u_store (
        .clk(clk), .rst_n(rst_n), .din(g_blk[g+1].s_out), .dout(s_end));
    end
  end

  assign y_out = g_blk[0].s_out;

endmodule
