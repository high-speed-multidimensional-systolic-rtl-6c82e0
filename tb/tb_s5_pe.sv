// tb_s5_pe: checks the four-coefficient S5 ladder PE in two forms: a
// registered PE (K = 8, a taps i1 = 2, 3, b taps i1 = 3, 4, line tap i2 = 5)
// and the register-less first PE of a section (K = 10, a taps 0, 1, b taps
// 1, 2).  Random bus values, {row, column} tags, partial sums on both lines
// and coefficients are applied every clock, with the zero-boundary mode on
// in the first half and off in the second.  The outputs are compared with
//   registered:    za(t+1) = wa(t) + ga1 q(a1 s(t-1)) + ga2 q(a2 s(t-2)),
//                  zb(t+1) = wb(t) + gb1 q(b1 s(t-1)) + gb2 q(b2 s(t-2)),
//                  bus out = s(t-1)
//   register-less: za(t) = wa(t) + ga1 q(a1 s(t)) + ga2 q(a2 s(t-1)), and
//                  likewise zb, bus out = s(t)
// where q() keeps product bits [10 +: 16], sums wrap at 16 bits, and the
// gate g of a tap i1 is 0 when the mode is on and the sample's
// column + i1 >= K or row + i2 >= K.
module tb_s5_pe;
  localparam int NCYC = 400;
  localparam int KA = 8,  TAA = 2, TBA = 3, IA = 5;   // registered PE
  localparam int KB = 10, TAB = 0, TBB = 1, IB = 0;   // register-less PE
  localparam int AWA = 3, AWB = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic zb_en;
  logic signed [11:0] a1, a2, b1, b2;
  logic signed [15:0] vi, wai, wbi;
  logic signed [15:0] vo0, za0, zb0, vo1, za1, zb1;
  logic [2*AWA-1:0] vta, vtao;
  logic [2*AWB-1:0] vtb, vtbo;
  int checks = 0, failures = 0, gated = 0;

  // per-cycle histories, offset by 2
  logic [15:0] hv [NCYC+4], hwa [NCYC+4], hwb [NCYC+4];
  logic [2*AWA-1:0] hta [NCYC+4];
  logic [2*AWB-1:0] htb [NCYC+4];
  logic hz [NCYC+4];

  always #5 clk = ~clk;

  s5_pe #(.K(KA), .TAP_A(TAA), .TAP_B(TBA), .I2(IA)) dut_reg (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_first(a1), .a_second(a2),
    .b_first(b1), .b_second(b2), .v_in(vi), .vt_in(vta), .v_out(vo0), .vt_out(vtao),
    .wa_in(wai), .za_out(za0), .wb_in(wbi), .zb_out(zb0));

  s5_pe #(.K(KB), .TAP_A(TAB), .TAP_B(TBB), .I2(IB), .REG(1'b0)) dut_comb (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_first(a1), .a_second(a2),
    .b_first(b1), .b_second(b2), .v_in(vi), .vt_in(vtb), .v_out(vo1), .vt_out(vtbo),
    .wa_in(wai), .za_out(za1), .wb_in(wbi), .zb_out(zb1));

  function automatic logic [15:0] q(input logic [15:0] v, input logic signed [11:0] c);
    longint p;
    p = longint'($signed(v)) * longint'(c);
    p = p >>> 10;
    return p[15:0];
  endfunction

  // gated product: zero when the tap leaves the K x K image
  function automatic logic [15:0] gq(input logic [15:0] v, input logic signed [11:0] c,
                                     input int col, input int row, input int i1, input int i2,
                                     input int k, input logic zb);
    if (zb && (col + i1 >= k || row + i2 >= k)) return '0;
    return q(v, c);
  endfunction

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("cycle %0d %s: got %h expected %h", n, what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] e;
    int cb, rb, c0, r0, c1, r1;
    a1 = '0; a2 = '0; b1 = '0; b2 = '0; vi = '0; wai = '0; wbi = '0; zb_en = 1'b1;
    vta = '0; vtb = '0;
    for (int i = 0; i < 2; i++) begin
      hv[i] = '0; hwa[i] = '0; hwb[i] = '0; hta[i] = '0; htb[i] = '0; hz[i] = 1'b1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      if (n == NCYC / 2) begin
        // second half: new coefficients, mode off, histories restarted by reset
        rst_n = 1'b0; #1 rst_n = 1'b1;
        zb_en = 1'b0;
        hv[n] = '0; hv[n + 1] = '0;
        hta[n] = '0; hta[n + 1] = '0; htb[n] = '0; htb[n + 1] = '0;
        hz[n] = 1'b0; hz[n + 1] = 1'b0;
      end
      if (n == 0 || n == NCYC / 2) begin
        a1 = 12'($urandom); a2 = 12'($urandom); b1 = 12'($urandom); b2 = 12'($urandom);
      end
      vi = 16'($urandom); wai = 16'($urandom); wbi = 16'($urandom);
      vta = 6'($urandom); vtb = 8'($urandom);
      hv[n + 2] = vi; hwa[n + 2] = wai; hwb[n + 2] = wbi;
      hta[n + 2] = vta; htb[n + 2] = vtb; hz[n + 2] = zb_en;
      #1;
      // register-less PE, combinational from the current inputs
      cb = int'(htb[n + 2][3:0]); rb = int'(htb[n + 2][7:4]);
      c1 = int'(htb[n + 1][3:0]); r1 = int'(htb[n + 1][7:4]);
      e = wai + gq(hv[n + 2], a1, cb, rb, TAB, IB, KB, hz[n + 2])
              + gq(hv[n + 1], a2, c1, r1, TAB + 1, IB, KB, hz[n + 1]);
      expect16(za1, e, "comb za", n);
      e = wbi + gq(hv[n + 2], b1, cb, rb, TBB, IB, KB, hz[n + 2])
              + gq(hv[n + 1], b2, c1, r1, TBB + 1, IB, KB, hz[n + 1]);
      expect16(zb1, e, "comb zb", n);
      expect16(vo1, vi, "comb v_out", n);
      expect16(16'(vtbo), 16'(vtb), "comb v tag", n);
      @(negedge clk);
      // registered PE, one clock after applying sample n
      c1 = int'(hta[n + 1][2:0]); r1 = int'(hta[n + 1][5:3]);
      c0 = int'(hta[n][2:0]);     r0 = int'(hta[n][5:3]);
      e = hwa[n + 2] + gq(hv[n + 1], a1, c1, r1, TAA, IA, KA, hz[n + 1])
                     + gq(hv[n], a2, c0, r0, TAA + 1, IA, KA, hz[n]);
      expect16(za0, e, "reg za", n);
      e = hwb[n + 2] + gq(hv[n + 1], b1, c1, r1, TBA, IA, KA, hz[n + 1])
                     + gq(hv[n], b2, c0, r0, TBA + 1, IA, KA, hz[n]);
      expect16(zb0, e, "reg zb", n);
      if (hz[n + 1] && r1 + IA < KA && c1 + TBA >= KA && c1 + TAA < KA) gated++;
      expect16(vo0, vi, "reg v_out", n);
      expect16(16'(vtao), 16'(vta), "reg v tag", n);
    end
    // gated counts samples where only the b tap crossed the right edge
    $display("products removed at the image border (b only): %0d", gated);
    if (gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
