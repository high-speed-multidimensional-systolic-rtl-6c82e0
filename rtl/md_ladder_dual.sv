// md_ladder_dual: 3-D systolic ladder recursive filter, dual of the
// S1-S1-S4 structure.
//
// It computes the same 3-D difference equation as md_ladder_s1s1s3 on a
// raster-scanned K x K video signal, one pixel per clock, but as the
// transpose of that chain: a single bus carries the filter state v to the
// right, and two partial-sum lines run to the left, the a line ending at the
// output node and the b line ending, through one pixel register, at the
// state node A that drives the bus:
//   v(n) = x(n) + sum_{i != 0} b(i) v(n - D(i)),   y(n) = sum_i a(i) v(n - D(i)),
// with D(i1,i2,i3) = i1 + K i2 + K^2 i3 (the canonic form of the recursive
// filter, with products rounded as in the PEs, so its rounding differs from
// the direct form of md_ladder_s1s1s3).
//
// Structure: (N2+1)(N3+1) first-level S5 sections (s5_level1) in the order
// (i2,i3) = (0,0), (1,0), ..., (N2,0), (0,1), ...  Between neighbouring
// sections the bus passes the rest of a line store, K - (2 p2 + 1) pixels,
// or of a frame store, K^2 - (N2 K + 2 p2 + 1) pixels, with p2 = <N1/2>, and
// each partial-sum line passes one pixel register.  The register that
// closes the b line at node A puts the origin section's b taps one pixel
// further out (that section holds b(1,0,0), b(2,0,0), ...); to keep the other
// sections aligned, the a line has one extra pixel register between the
// first two sections and the first bus store is one pixel shorter.  Every
// line store (N2 (N3+1) of them) and frame store (N3) appears once, on the
// bus.  The transposed chain, the input added into the b line next to the
// first PE, the extra register on the a line and the shortened first line
// store follow the published structure; the store lengths are derived here.
//
// Zero boundary (this design's own circuitry): each section keeps a raster
// counter that gives the {row, column} of the state sample entering it (the
// counter is reset to the position that sample has after the section's bus
// delay), and its PEs zero products that would cross the right or bottom
// image edge when zb_en is set.
//
// Interface and timing: x_in is taken at every rising clock edge after
// reset; y_out after the edge that takes pixel n holds the response to
// pixel n - 1, an input latency of one period.  The longest
// register-to-register path is one multiplier plus one adder after it; the
// other adders of a PE add register outputs (and, in the first PE, the
// input) while the multiplier works.  The tag leaving the last section (vto)
// is not used, and is reported as such.  K must be at least 2<N1/2> + 3.
module md_ladder_dual #(
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

  localparam int unsigned G  = (N2 + 1) * (N3 + 1);
  localparam int unsigned NP = ladder_pkg::pairs(N1);
  localparam int unsigned AW = ladder_pkg::tag_w(K);

  if (K < 2 * NP + 1) begin : g_check
    $error("md_ladder_dual: K must be at least 2<N1/2> + 3");
  end

  // length of the bus store in front of section g (g >= 1)
  function automatic int unsigned store_len(input int unsigned g);
    int unsigned len;
    len = (g % (N2 + 1) != 0) ? ladder_pkg::dual_line_gap(N1, K)
                              : ladder_pkg::dual_frame_gap(N1, N2, K);
    return (g == 1) ? len - 1 : len;
  endfunction

  // bus delay from node A to the first PE of section g
  function automatic longint unsigned bus_delay(input int unsigned g);
    longint unsigned d;
    d = 0;
    for (int unsigned h = 1; h <= g; h++) d += longint'(NP) - 1 + longint'(store_len(h));
    return d;
  endfunction

  logic signed [W-1:0] vi [G], vo [G];     // bus into / out of section g
  logic [2*AW-1:0]     vti [G], vto [G];   // tags into / out of section g
  logic signed [W-1:0] wa [G], za [G];     // a line into / out of section g
  logic signed [W-1:0] wb [G], zb [G];     // b line into / out of section g
  logic signed [W-1:0] v;                  // state node A
  logic signed [W-1:0] y;                  // output node

  assign y      = za[0];
  assign vi[0]  = v;
  assign wa[G-1] = '0;
  assign wb[G-1] = '0;

  // node A: the b line closes through one pixel register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v <= '0;
    else        v <= zb[0];

  for (genvar g = 0; g < int'(G); g++) begin : g_sec
    localparam int unsigned I3    = g / (N2 + 1);
    localparam int unsigned I2    = g % (N2 + 1);
    localparam int unsigned START = ladder_pkg::raster_back(bus_delay(g) + 1, K);

    logic [AW-1:0] col, row;

    // raster position of the state sample at the section input
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        col <= AW'(START % K);
        row <= AW'(START / K);
      end else if (col == AW'(K - 1)) begin
        col <= '0;
        row <= (row == AW'(K - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    assign vti[g] = {row, col};

    s5_level1 #(
      .W(W), .CW(CW), .FRAC(FRAC), .N1(N1), .I2(I2), .K(K), .ORIGIN(g == 0)
    ) u_sec (
      .clk   (clk),
      .rst_n (rst_n),
      .zb_en (zb_en),
      .a_coef(a_coef[I3][I2]),
      .b_coef(b_coef[I3][I2]),
      .v_in  (vi[g]),
      .vt_in (vti[g]),
      .v_out (vo[g]),
      .vt_out(vto[g]),
      .wa_in (wa[g]),
      .za_out(za[g]),
      .wb_in (wb[g]),
      .zb_out(zb[g]),
      .x_add ((g == 0) ? x_in : '0)
    );

    if (g > 0) begin : g_join
      // rest of the line store (I2 != 0) or of the frame store (I2 == 0)
      pixel_delay #(.W(W), .LEN(store_len(g))) u_store (
        .clk(clk), .rst_n(rst_n), .din(vo[g-1]), .dout(vi[g]));
      // one pixel register on each partial-sum line, two on the a line
      // between the first two sections
      pixel_delay #(.W(W), .LEN((g == 1) ? 2 : 1)) u_aline (
        .clk(clk), .rst_n(rst_n), .din(za[g]), .dout(wa[g-1]));
      pixel_delay #(.W(W), .LEN(1)) u_bline (
        .clk(clk), .rst_n(rst_n), .din(zb[g]), .dout(wb[g-1]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y_out <= '0;
    else        y_out <= y;

endmodule
