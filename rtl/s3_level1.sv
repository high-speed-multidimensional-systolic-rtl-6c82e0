// s3_level1: first-level S3 structure for one coefficient set (i2, i3).
//
// It realises the 1-D part of the filter along the pixel direction k1:
//   z = w + sum_{i1=0..N1} b(i1,i2,i3) y(.-i1) + a(i1,i2,i3) x(.-i1-LAT)
// as a cascade of 2*NP identical two-coefficient PEs (NP = <N1/2> + 1):
// first NP recursive PEs on the y bus holding b(0),b(1) | b(2),b(3) | ...,
// then NP nonrecursive PEs on the x bus holding a(0),a(1) | a(2),a(3) | ...
// Coefficients past N1 (odd tap count) are zero.  The buses pass one pixel
// register per PE to the right and the partial sum one pixel register per PE
// to the left, so each PE is two periods further from the output than its
// left neighbour, matching its two taps.  The first PE has no registers of
// its own: p2 = 2<N1/2> + 1 pixel registers lie on the bus path and as many
// on the partial-sum path, the ones in front of the first PE belong to the
// line or frame register that feeds it.
//
// Interface: x_in/y_in enter at the left and leave registered at x_out/y_out
// after p2 periods; w_in is the partial sum from the section to the right;
// z_out (combinational from w, the first PE's registered second product and
// its first product) goes to the left.  ORIGIN = 1 marks the section of
// b(.,0,0): its b(0,0,0) multiplier is absent, since y(k) cannot depend on
// itself, and its z_out is the filter output node.  The {row, column} tags
// of the buses (xt, yt) travel through the same registers as the samples and
// let each PE zero its products at the image border when zb_en is set; I2 is
// the line tap of this section and K the frame size for that test.
module s3_level1 #(
  parameter int unsigned W      = ladder_pkg::DATA_W,
  parameter int unsigned CW     = ladder_pkg::COEF_W,
  parameter int unsigned FRAC   = ladder_pkg::COEF_FRAC,
  parameter int unsigned N1     = 3,
  parameter int unsigned I2     = 0,
  parameter int unsigned K      = 64,
  parameter bit          ORIGIN = 1'b0,
  localparam int unsigned AW    = ladder_pkg::tag_w(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 zb_en,
  input  logic signed [CW-1:0] a_coef [N1+1],
  input  logic signed [CW-1:0] b_coef [N1+1],
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  input  logic [2*AW-1:0]      xt_in,
  input  logic [2*AW-1:0]      yt_in,
  output logic [2*AW-1:0]      xt_out,
  output logic [2*AW-1:0]      yt_out,
  input  logic signed [W-1:0]  w_in,
  output logic signed [W-1:0]  z_out
);

  localparam int unsigned NP = ladder_pkg::pairs(N1);
  localparam int unsigned P  = 2 * NP;

  logic signed [W-1:0]  xb [P+1];   // xb[e]: x bus into PE e
  logic signed [W-1:0]  yb [P+1];
  logic signed [W-1:0]  zs [P+1];   // zs[e]: partial sum out of PE e
  logic [2*AW-1:0]      xt [P+1];
  logic [2*AW-1:0]      yt [P+1];
  logic signed [CW-1:0] cf [P];
  logic signed [CW-1:0] cs [P];

  assign xb[0] = x_in;
  assign yb[0] = y_in;
  assign zs[P] = w_in;
  assign xt[0] = xt_in;
  assign yt[0] = yt_in;

  for (genvar e = 0; e < int'(P); e++) begin : g_pe
    localparam bit          IS_A = (e >= int'(NP));
    localparam int unsigned T0   = 2 * (IS_A ? (e - NP) : e);  // tap i1 of c_first

    if (IS_A) begin : g_ca
      assign cf[e] = a_coef[T0];
      if (T0 + 1 <= N1) begin : g_s
        assign cs[e] = a_coef[T0+1];
      end else begin : g_z
        assign cs[e] = '0;
      end
    end else begin : g_cb
      assign cf[e] = b_coef[T0];
      if (T0 + 1 <= N1) begin : g_s
        assign cs[e] = b_coef[T0+1];
      end else begin : g_z
        assign cs[e] = '0;
      end
    end

    s3_pe #(
      .W(W), .CW(CW), .FRAC(FRAC),
      .K(K), .TAP1(T0), .I2(I2),
      .USE_X(IS_A),
      .REG(e != 0),
      .HAS_FIRST(!(ORIGIN && e == 0))
    ) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .zb_en   (zb_en),
      .c_first (cf[e]),
      .c_second(cs[e]),
      .x_in    (xb[e]),
      .y_in    (yb[e]),
      .x_out   (xb[e+1]),
      .y_out   (yb[e+1]),
      .xt_in   (xt[e]),
      .yt_in   (yt[e]),
      .xt_out  (xt[e+1]),
      .yt_out  (yt[e+1]),
      .w_in    (zs[e+1]),
      .z_out   (zs[e])
    );
  end

  assign x_out = xb[P];
  assign y_out = yb[P];
  assign xt_out = xt[P];
  assign yt_out = yt[P];
  assign z_out = zs[0];

endmodule
