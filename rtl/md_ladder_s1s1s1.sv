// md_ladder_s1s1s1: 3-D recursive filter, structure S1-S1-S1 (the simple,
// non-systolic member of the family, with broadcast wiring).
//
// It computes the 3-D difference equation of md_ladder_s1s1s3 (direct form,
// same rounding, bit-identical output) by nesting the canonic 1-D structure
// S1 at all three levels.  The input x and the output y are broadcast to
// every tap; each tap (i1,i2,i3) adds q(a(i) x) + q(b(i) y) into a partial
// sum that is delayed on its way to the output node: one pixel register per
// step in i1 inside a first-level block, one full line register (K pixels)
// per step in i2 between first-level blocks, one full frame register (K^2
// pixels) per step in i3 between second-level blocks.  The line and frame
// registers are thus at their canonic number, and no pixel register is
// added, but the broadcast wires load x and y with every multiplier and the
// longest path runs from x through a(0,0,0), the node adders, y, a b
// multiplier and the adders behind it (two multipliers and several adders).
// Tap (0,0,0) has no b coefficient (its input is zero).  This arrangement
// follows the published S1-S1-S1 structure, and so does the default order
// N1 = N2 = N3 = 1; the word formats, reset, output register and
// zero-boundary gating are this design's own.
//
// Interface and timing: the ports of md_ladder_s1s1s3.  y is combinational
// from x_in and the registers; y_out registers it, so the edge that takes
// pixel n loads y_out with the response to pixel n (LAT = 0 in the terms
// of the other filters: the response is visible one period after its pixel
// is applied).  Zero boundary (own circuitry): a raster
// counter gives the {row, column} of the current pixel, and with zb_en set a
// tap (i1, i2) drops its products when column + i1 >= K or row + i2 >= K,
// since they would land on a pixel of the next line or frame.
module md_ladder_s1s1s1 #(
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

  localparam int unsigned AW = ladder_pkg::tag_w(K);

  if (K < N1 + 1) begin : g_check
    $error("md_ladder_s1s1s1: K must be at least N1 + 1");
  end

  logic signed [W-1:0] y;                   // output node, broadcast to the b taps
  logic [AW-1:0]       col, row;            // raster position of the current pixel

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else begin
      col <= (col == AW'(K - 1)) ? '0 : col + 1'b1;
      if (col == AW'(K - 1)) row <= (row == AW'(K - 1)) ? '0 : row + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y_out <= '0;
    else        y_out <= y;

  // third level: one second-level block per i3, frame registers between them
  for (genvar i3 = 0; i3 <= int'(N3); i3++) begin : g_i3
    logic signed [W-1:0] z3;                // sum of blocks i3 .. N3, at this block
    logic signed [W-1:0] z2;                // output of the second-level block

    // second level: one first-level block per i2, line registers between them
    for (genvar i2 = 0; i2 <= int'(N2); i2++) begin : g_i2
      logic signed [W-1:0] s2;              // sum of blocks i2 .. N2, at this block
      logic signed [W-1:0] z1;              // output of the first-level block

      // first level: one tap per i1, pixel registers between them
      for (genvar i1 = 0; i1 <= int'(N1); i1++) begin : g_i1
        logic signed [W+CW-1:0] fa;
        logic signed [W-1:0]    pa, pb, s1;
        logic                   cut;

        assign cut = zb_en && ((int'(col) + i1 >= int'(K)) || (int'(row) + i2 >= int'(K)));
        assign fa  = x_in * a_coef[i3][i2][i1];
        assign pa  = cut ? '0 : fa[FRAC +: W];
        if (i1 == 0 && i2 == 0 && i3 == 0) begin : g_nob
          assign pb = '0;
        end else begin : g_b
          logic signed [W+CW-1:0] fb;
          assign fb = y * b_coef[i3][i2][i1];
          assign pb = cut ? '0 : fb[FRAC +: W];
        end

        if (i1 == N1) begin : g_end
          assign s1 = pa + pb;
        end else begin : g_mid
          assign s1 = (pa + pb) + g_i1[i1+1].g_reg.r1;
        end
        if (i1 == 0) begin : g_out
          assign z1 = s1;
        end else begin : g_reg
          logic signed [W-1:0] r1;          // pixel register toward tap i1 - 1
          always_ff @(posedge clk or negedge rst_n)
            if (!rst_n) r1 <= '0;
            else        r1 <= s1;
        end
      end

      logic signed [W-1:0] l2;              // sum from block i2 + 1, one line later
      if (i2 == N2) begin : g_end
        assign l2 = '0;
      end else begin : g_line
        pixel_delay #(.W(W), .LEN(K)) u_line (
          .clk(clk), .rst_n(rst_n), .din(g_i2[i2+1].s2), .dout(l2));
      end
      assign s2 = z1 + l2;
    end
    assign z2 = g_i2[0].s2;

    logic signed [W-1:0] l3;                // sum from block i3 + 1, one frame later
    if (i3 == N3) begin : g_end
      assign l3 = '0;
    end else begin : g_frame
      pixel_delay #(.W(W), .LEN(K * K)) u_frame (
        .clk(clk), .rst_n(rst_n), .din(g_i3[i3+1].z3), .dout(l3));
    end
    assign z3 = z2 + l3;
  end
  assign y = g_i3[0].z3;

endmodule
