// s5_level1: first-level S5 section for one coefficient set (i2, i3) of the
// dual S1-S1-S4 ladder filter.
//
// It realises the pixel-direction part of the filter for one line/frame tap
// as a cascade of NP = <N1/2> + 1 four-coefficient PEs (s5_pe) on one bus v.
// PE j holds a(2j), a(2j+1) on the a line and, on the b line, b(2j), b(2j+1)
// or, in the origin section (ORIGIN = 1, the taps b(.,0,0)), b(2j+1), b(2j+2):
// there the b line passes one more pixel register before it feeds the bus, so
// its taps sit one pixel further out and b(0,0,0), which does not exist, needs
// no multiplier.  Coefficients past N1 are zero.  The bus passes one pixel
// register per PE to the right and each partial-sum line one per PE to the
// left, so PE j is 2j periods from the section's first PE.  The first PE has
// no registers of its own (they belong to the line or frame store in front
// of it), which leaves p2 = <N1/2> pixel registers on the bus path.  This
// arrangement follows the published dual S1-S1-S4 structure; the tap
// bookkeeping is worked out here.
//
// Interface: v_in/vt_in (sample and {row, column} tag) enter at the left and
// leave at v_out/vt_out p2 periods later.  wa_in/wb_in are the partial sums
// from the section to the right; za_out/zb_out (combinational in the first
// PE) go to the left.  x_add is added to the b line in front of the first PE;
// the origin section uses it to inject the filter input, the others tie it to
// zero.
module s5_level1 #(
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
  input  logic signed [W-1:0]  v_in,
  input  logic [2*AW-1:0]      vt_in,
  output logic signed [W-1:0]  v_out,
  output logic [2*AW-1:0]      vt_out,
  input  logic signed [W-1:0]  wa_in,
  output logic signed [W-1:0]  za_out,
  input  logic signed [W-1:0]  wb_in,
  output logic signed [W-1:0]  zb_out,
  input  logic signed [W-1:0]  x_add
);

  localparam int unsigned NP = ladder_pkg::pairs(N1);
  localparam int unsigned BS = ORIGIN ? 1 : 0;   // shift of the b taps

  logic signed [W-1:0]  vb [NP+1];   // vb[j]: bus into PE j
  logic [2*AW-1:0]      vt [NP+1];
  logic signed [W-1:0]  za [NP+1];   // za[j]: a line out of PE j
  logic signed [W-1:0]  zb [NP+1];
  logic signed [W-1:0]  wb0;         // b line into the first PE
  logic signed [CW-1:0] c [NP][4];   // a first, a second, b first, b second

  assign vb[0]  = v_in;
  assign vt[0]  = vt_in;
  assign za[NP] = wa_in;
  assign zb[NP] = wb_in;
  assign wb0    = zb[1] + x_add;

  for (genvar j = 0; j < int'(NP); j++) begin : g_pe
    localparam int unsigned TA = 2 * j;
    localparam int unsigned TB = 2 * j + BS;

    for (genvar h = 0; h < 2; h++) begin : g_c
      if (TA + h <= N1) begin : g_a
        assign c[j][h] = a_coef[TA+h];
      end else begin : g_az
        assign c[j][h] = '0;
      end
      if (TB + h <= N1) begin : g_b
        assign c[j][2+h] = b_coef[TB+h];
      end else begin : g_bz
        assign c[j][2+h] = '0;
      end
    end

    s5_pe #(
      .W(W), .CW(CW), .FRAC(FRAC), .K(K),
      .TAP_A(TA), .TAP_B(TB), .I2(I2), .REG(j != 0)
    ) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .zb_en   (zb_en),
      .a_first (c[j][0]),
      .a_second(c[j][1]),
      .b_first (c[j][2]),
      .b_second(c[j][3]),
      .v_in    (vb[j]),
      .vt_in   (vt[j]),
      .v_out   (vb[j+1]),
      .vt_out  (vt[j+1]),
      .wa_in   (za[j+1]),
      .za_out  (za[j]),
      .wb_in   ((j == 0) ? wb0 : zb[j+1]),
      .zb_out  (zb[j])
    );
  end

  assign v_out  = vb[NP];
  assign vt_out = vt[NP];
  assign za_out = za[0];
  assign zb_out = zb[0];

endmodule
