// tb_s5_level1: checks one first-level S5 section with random bus values,
// partial sums, injected inputs and coefficients applied every clock, at the
// default N1 = 3 and, as the origin section of a filter, at N1 = 2.  With
// NP = <N1/2> + 1 PEs and B = 1 for the origin section, 0 otherwise, the
// section must give
//   za(t) = wa(t-NP+1) + sum_{i1=0..N1} a(i1) v(t-i1)
//   zb(t) = wb(t-NP+1) + x_add(t) + sum_{i1=B..N1} b(i1) v(t-i1+B)
//   v_out(t) = v(t-NP+1)
// where every product keeps bits [10 +: 16] and sums wrap at 16 bits.
// The zero-boundary mode is on and each sample carries a random {row,
// column} tag: a product of tap (i1, I2) is zero when column + i1 >= K or
// row + I2 >= K for the sample it multiplies (default section: K = 64,
// I2 = 0; origin section: K = 8, I2 = 1).  Tags must leave with their
// samples.
module tb_s5_level1;
  localparam int NCYC = 400;
  localparam int H    = 16;   // history offset

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [11:0] a3 [4], b3 [4], a2 [3], b2 [3];
  logic signed [15:0] vi, wai, wbi, xa;
  logic signed [15:0] vo3, za3, zb3, vo2, za2, zb2;
  logic [15:0] hv [NCYC+H], hwa [NCYC+H], hwb [NCYC+H];
  logic [11:0] t3 [NCYC+H];   // tags, K = 64 (6 + 6 bits)
  logic [5:0]  t2 [NCYC+H];   // tags, K = 8 (3 + 3 bits)
  logic [11:0] vt3, vto3;
  logic [5:0]  vt2, vto2;
  logic zb_en = 1'b1;
  int gated = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s5_level1 dut3 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a3), .b_coef(b3),
    .v_in(vi), .vt_in(vt3), .v_out(vo3), .vt_out(vto3),
    .wa_in(wai), .za_out(za3), .wb_in(wbi), .zb_out(zb3), .x_add(xa));

  s5_level1 #(.N1(2), .ORIGIN(1'b1), .K(8), .I2(1)) dut2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a2), .b_coef(b2),
    .v_in(vi), .vt_in(vt2), .v_out(vo2), .vt_out(vto2),
    .wa_in(wai), .za_out(za2), .wb_in(wbi), .zb_out(zb2), .x_add(xa));

  function automatic logic [15:0] q(input logic [15:0] v, input logic signed [11:0] c);
    longint p;
    p = longint'($signed(v)) * longint'(c);
    p = p >>> 10;
    return p[15:0];
  endfunction

  // gated product for tap (i1, i2) of a sample with tag {row, col} in a K x K frame
  function automatic logic [15:0] gq(input logic [15:0] v, input logic signed [11:0] c,
                                     input int col, input int row, input int i1, input int i2,
                                     input int k);
    if (col + i1 >= k || row + i2 >= k) return '0;
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
    logic [15:0] ea, eb;
    int m;
    for (int i = 0; i < H; i++) begin
      hv[i] = '0; hwa[i] = '0; hwb[i] = '0; t3[i] = '0; t2[i] = '0;
    end
    for (int i = 0; i < 4; i++) begin a3[i] = 12'($urandom); b3[i] = 12'($urandom); end
    for (int i = 0; i < 3; i++) begin a2[i] = 12'($urandom); b2[i] = 12'($urandom); end
    vi = '0; wai = '0; wbi = '0; xa = '0; vt3 = '0; vt2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      vi = 16'($urandom); wai = 16'($urandom); wbi = 16'($urandom); xa = 16'($urandom);
      vt3 = 12'($urandom); vt2 = 6'($urandom);
      hv[n + H] = vi; hwa[n + H] = wai; hwb[n + H] = wbi; t3[n + H] = vt3; t2[n + H] = vt2;
      #1;
      // N1 = 3: NP = 2, b taps not shifted
      ea = hwa[n + H - 1];
      eb = hwb[n + H - 1] + xa;
      for (int i1 = 0; i1 <= 3; i1++) begin
        m = n + H - i1;
        ea += gq(hv[m], a3[i1], int'(t3[m][5:0]), int'(t3[m][11:6]), i1, 0, 64);
        eb += gq(hv[m], b3[i1], int'(t3[m][5:0]), int'(t3[m][11:6]), i1, 0, 64);
      end
      expect16(za3, ea, "N1=3 za", n);
      expect16(zb3, eb, "N1=3 zb", n);
      expect16(vo3, hv[n + H - 1], "N1=3 v_out", n);
      expect16(16'(vto3), 16'(t3[n + H - 1]), "N1=3 v tag", n);
      // N1 = 2, origin: NP = 2, b taps shifted by one, no b(0)
      ea = hwa[n + H - 1];
      eb = hwb[n + H - 1] + xa;
      for (int i1 = 0; i1 <= 2; i1++) begin
        m = n + H - i1;
        ea += gq(hv[m], a2[i1], int'(t2[m][2:0]), int'(t2[m][5:3]), i1, 1, 8);
        if (i1 > 0) begin
          m = n + H - i1 + 1;
          eb += gq(hv[m], b2[i1], int'(t2[m][2:0]), int'(t2[m][5:3]), i1, 1, 8);
          if (int'(t2[m][2:0]) + i1 >= 8 || int'(t2[m][5:3]) + 1 >= 8) gated++;
        end
      end
      expect16(za2, ea, "N1=2 za", n);
      expect16(zb2, eb, "N1=2 zb", n);
      expect16(vo2, hv[n + H - 1], "N1=2 v_out", n);
      expect16(16'(vto2), 16'(t2[n + H - 1]), "N1=2 v tag", n);
      @(negedge clk);
    end
    $display("b products removed at the image border: %0d", gated);
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
