// s5_pe: processing element of the S5 ladder structure (the dual of S4).
//
// One PE holds four programmable coefficients that all act on the same bus
// signal v: a nonrecursive pair (a_first, a_second) and a recursive pair
// (b_first, b_second).  The bus runs to the right and passes a pixel register
// T1 at the PE input.  Two partial sums run to the left, each through a pixel
// register T1 at the PE output: the a line, which ends at the filter output,
// and the b line, which ends at the state node that feeds the bus.  In each
// line a register inside the PE delays the second product by one period, so
// one PE realises two consecutive pixel taps of both coefficient sets.  The
// shared bus (one set of pixel registers for the a and b parts) and the two
// accumulation lines follow the published S5 structure; the adder order
// ((w + v) + p_first) is this design's choice and keeps the longest
// register-to-register path at one multiplier plus one adder.
//
// Zero boundary (this design's own circuitry): the bus carries a tag
// {row k2, column k1} with each sample.  With zb_en set, a product of tap
// (i1, I2) is replaced by zero when column + i1 >= K or row + I2 >= K.
//
// Timing (REG = 1): with bus value s(t) at the PE input and partial sums
// wa(t), wb(t) from the right,
//   za(t+1) = wa(t) + q(a_first * s(t-1)) + q(a_second * s(t-2)),
//   zb(t+1) = wb(t) + q(b_first * s(t-1)) + q(b_second * s(t-2)),
// where q() keeps bits [FRAC +: W] of the full product (arithmetic shift,
// truncation; the dropped low and guard bits are reported as unused) and
// every sum wraps modulo 2^W.  REG = 0 removes the bus and both output
// registers (the first PE of a section); za and zb are then combinational.
module s5_pe #(
  parameter int unsigned W      = ladder_pkg::DATA_W,
  parameter int unsigned CW     = ladder_pkg::COEF_W,
  parameter int unsigned FRAC   = ladder_pkg::COEF_FRAC,
  parameter int unsigned K      = 64,    // pixels per line and lines per frame
  parameter int unsigned TAP_A  = 0,     // pixel tap i1 of a_first
  parameter int unsigned TAP_B  = 0,     // pixel tap i1 of b_first
  parameter int unsigned I2     = 0,     // line tap i2 of all four coefficients
  parameter bit          REG    = 1'b1,
  localparam int unsigned AW    = ladder_pkg::tag_w(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 zb_en,
  input  logic signed [CW-1:0] a_first,
  input  logic signed [CW-1:0] a_second,
  input  logic signed [CW-1:0] b_first,
  input  logic signed [CW-1:0] b_second,
  input  logic signed [W-1:0]  v_in,
  input  logic [2*AW-1:0]      vt_in,    // {row, column} of v_in
  output logic signed [W-1:0]  v_out,
  output logic [2*AW-1:0]      vt_out,
  input  logic signed [W-1:0]  wa_in,
  output logic signed [W-1:0]  za_out,
  input  logic signed [W-1:0]  wb_in,
  output logic signed [W-1:0]  zb_out
);

  logic signed [W-1:0]    s, pa1, pa2, pb1, pb2, va, vb, suma, sumb;
  logic [2*AW-1:0]        st;
  logic signed [W+CW-1:0] fa1, fa2, fb1, fb2;
  logic                   row_out;
  logic [AW:0]            col;

  if (REG) begin : g_busreg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        s  <= '0;
        st <= '0;
      end else begin
        s  <= v_in;
        st <= vt_in;
      end
  end else begin : g_buswire
    assign s  = v_in;
    assign st = vt_in;
  end

  assign v_out  = s;
  assign vt_out = st;

  // a product is kept only if its tap stays inside the image
  function automatic logic keep(input logic zb, input logic rout, input logic [AW:0] c,
                                input int unsigned tap);
    return !zb || (!rout && (32'(c) + tap < K));
  endfunction

  assign col     = {1'b0, st[AW-1:0]};
  assign row_out = (32'(st[2*AW-1:AW]) + I2 >= K);

  assign fa1 = s * a_first;
  assign fa2 = s * a_second;
  assign fb1 = s * b_first;
  assign fb2 = s * b_second;
  assign pa1 = keep(zb_en, row_out, col, TAP_A)     ? fa1[FRAC +: W] : '0;
  assign pa2 = keep(zb_en, row_out, col, TAP_A + 1) ? fa2[FRAC +: W] : '0;
  assign pb1 = keep(zb_en, row_out, col, TAP_B)     ? fb1[FRAC +: W] : '0;
  assign pb2 = keep(zb_en, row_out, col, TAP_B + 1) ? fb2[FRAC +: W] : '0;

  // internal pixel registers (delay the second products)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      va <= '0;
      vb <= '0;
    end else begin
      va <= pa2;
      vb <= pb2;
    end

  assign suma = (wa_in + va) + pa1;
  assign sumb = (wb_in + vb) + pb1;

  if (REG) begin : g_outreg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        za_out <= '0;
        zb_out <= '0;
      end else begin
        za_out <= suma;
        zb_out <= sumb;
      end
  end else begin : g_outwire
    assign za_out = suma;
    assign zb_out = sumb;
  end

endmodule
