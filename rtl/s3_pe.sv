// s3_pe: processing element of the S3 systolic ladder structure.
//
// One PE holds two programmable multiplier coefficients, c_first and
// c_second, that act on the same bus signal (the output bus y for a
// recursive PE, the input bus x for a nonrecursive PE).  The x and y buses
// run to the right and pass a pixel register T1 at the PE input; the partial
// sum runs to the left and passes a pixel register T1 at the PE output.  A
// further pixel register inside the PE delays the second product by one
// period, so one PE realises two consecutive taps i1 = TAP1 and TAP1 + 1.
// This grouping of two coefficients per PE with local connections only
// follows the S3 structure; the ordering of the two adders
// ((w + v) + p_first) is this design's reading of the published PE and keeps the
// longest register-to-register path at one multiplier plus one adder.
//
// Zero boundary (this design's own circuitry): each bus carries, next to the
// sample, a tag {row k2, column k1} of the pixel it belongs to, registered
// with it.  When zb_en is set, a product whose tap (i1, I2) would carry the
// pixel past the right or bottom edge of the K x K image, i.e. column + i1 >= K
// or row + I2 >= K, is replaced by zero, so the filter sees zeros outside
// the image instead of the neighbouring line or frame.
//
// Timing (REG = 1): with bus value s(t) at the PE input at cycle t and
// partial sum w(t) from the right,
//   z(t+1) = w(t) + q(c_first * s(t-1)) + q(c_second * s(t-2)),
// where q() keeps bits [FRAC +: W] of the full product (arithmetic shift,
// truncation) and every sum wraps modulo 2^W.  The low FRAC bits and the top
// guard bits of each product are dropped on purpose (reported as unused).
// REG = 0 removes the bus and output registers (the first PE of a
// first-level section, whose registers are counted in the neighbouring line
// or frame register); z is then combinational.  HAS_FIRST = 0 removes the
// first multiplier, used for the absent coefficient b(0,0,0).
module s3_pe #(
  parameter int unsigned W         = ladder_pkg::DATA_W,
  parameter int unsigned CW        = ladder_pkg::COEF_W,
  parameter int unsigned FRAC      = ladder_pkg::COEF_FRAC,
  parameter int unsigned K         = 64,    // pixels per line and lines per frame
  parameter int unsigned TAP1      = 0,     // pixel tap i1 of c_first
  parameter int unsigned I2        = 0,     // line tap i2 of both coefficients
  parameter bit          USE_X     = 1'b0,  // 1: taps on x bus (a), 0: on y bus (b)
  parameter bit          REG       = 1'b1,
  parameter bit          HAS_FIRST = 1'b1,
  localparam int unsigned AW       = ladder_pkg::tag_w(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 zb_en,
  input  logic signed [CW-1:0] c_first,
  input  logic signed [CW-1:0] c_second,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic [2*AW-1:0]      xt_in,    // {row, column} of x_in
  input  logic [2*AW-1:0]      yt_in,    // {row, column} of y_in
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  output logic [2*AW-1:0]      xt_out,
  output logic [2*AW-1:0]      yt_out,
  input  logic signed [W-1:0]  w_in,
  output logic signed [W-1:0]  z_out
);

  logic signed [W-1:0]    xb, yb, s, p_first, p_second, v, sum;
  logic [2*AW-1:0]        xtb, ytb, st;
  logic signed [W+CW-1:0] full_second;
  logic                   row_out, cut_first, cut_second;

  if (REG) begin : g_busreg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        xb  <= '0;
        yb  <= '0;
        xtb <= '0;
        ytb <= '0;
      end else begin
        xb  <= x_in;
        yb  <= y_in;
        xtb <= xt_in;
        ytb <= yt_in;
      end
  end else begin : g_buswire
    assign xb  = x_in;
    assign yb  = y_in;
    assign xtb = xt_in;
    assign ytb = yt_in;
  end

  assign x_out  = xb;
  assign y_out  = yb;
  assign xt_out = xtb;
  assign yt_out = ytb;
  assign s      = USE_X ? xb  : yb;
  assign st     = USE_X ? xtb : ytb;

  // boundary tests of the two taps for the pixel on the bus
  assign row_out    = (32'(st[2*AW-1:AW]) + I2 >= K);
  assign cut_first  = zb_en && (row_out || (32'(st[AW-1:0]) + TAP1 >= K));
  assign cut_second = zb_en && (row_out || (32'(st[AW-1:0]) + TAP1 + 1 >= K));

  if (HAS_FIRST) begin : g_first
    logic signed [W+CW-1:0] full_first;
    assign full_first = s * c_first;
    assign p_first    = cut_first ? '0 : full_first[FRAC +: W];
  end else begin : g_nofirst
    assign p_first = '0;
  end

  assign full_second = s * c_second;
  assign p_second    = cut_second ? '0 : full_second[FRAC +: W];

  // internal pixel register of the PE (delays the second product)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v <= '0;
    else        v <= p_second;

  assign sum = (w_in + v) + p_first;

  if (REG) begin : g_outreg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) z_out <= '0;
      else        z_out <= sum;
  end else begin : g_outwire
    assign z_out = sum;
  end

endmodule
