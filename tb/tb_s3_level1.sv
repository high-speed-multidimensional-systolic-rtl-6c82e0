// tb_s3_level1: checks one first-level S3 section with random bus values,
// partial sums and coefficients applied every clock, at the default N1 = 3
// and, as the origin section of a filter, at N1 = 2 (odd coefficient count
// padded, b(0) absent).  With P = 2(<N1/2> + 1) PEs the section must give
//   z(t) = w(t-P+1) + sum_i1 b(i1) y(t-i1) + a(i1) x(t-P-i1)
//   x_out(t) = x(t-P+1), y_out(t) = y(t-P+1)
// where every product keeps bits [10 +: 16] and sums wrap at 16 bits.
// The zero-boundary mode is on and each sample carries a random {row,
// column} tag: a product of tap (i1, I2) is zero when column + i1 >= K or
// row + I2 >= K for the sample it multiplies (default section: K = 64,
// I2 = 0; second section: K = 8, I2 = 1).  Tags must leave with their
// samples.
module tb_s3_level1;
  localparam int NCYC = 400;
  localparam int H    = 16;   // history offset

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [11:0] a3 [4], b3 [4], a2 [3], b2 [3];
  logic signed [15:0] xi, yi, wi;
  logic signed [15:0] xo3, yo3, z3, xo2, yo2, z2;
  logic [15:0] hx [NCYC+H], hy [NCYC+H], hw [NCYC+H];
  logic [11:0] txa [NCYC+H], tya [NCYC+H];   // tags, K = 64 (6 + 6 bits)
  logic [5:0]  txb [NCYC+H], tyb [NCYC+H];   // tags, K = 8 (3 + 3 bits)
  logic [11:0] xt3, yt3, xto3, yto3;
  logic [5:0]  xt2, yt2, xto2, yto2;
  logic zb_en = 1'b1;
  int gated = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s3_level1 dut3 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a3), .b_coef(b3),
    .x_in(xi), .y_in(yi), .x_out(xo3), .y_out(yo3),
    .xt_in(xt3), .yt_in(yt3), .xt_out(xto3), .yt_out(yto3), .w_in(wi), .z_out(z3));

  s3_level1 #(.N1(2), .ORIGIN(1'b1), .K(8), .I2(1)) dut2 (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .a_coef(a2), .b_coef(b2),
    .x_in(xi), .y_in(yi), .x_out(xo2), .y_out(yo2),
    .xt_in(xt2), .yt_in(yt2), .xt_out(xto2), .yt_out(yto2), .w_in(wi), .z_out(z2));

  // gated product for tap (i1, i2) of a sample with tag {row, col} in a K x K frame
  function automatic logic [15:0] gq(input logic [15:0] v, input logic signed [11:0] c,
                                     input int col, input int row, input int i1, input int i2,
                                     input int k);
    if (col + i1 >= k || row + i2 >= k) return '0;
    return q(v, c);
  endfunction

  function automatic logic [15:0] q(input logic [15:0] v, input logic signed [11:0] c);
    longint p;
    p = longint'($signed(v)) * longint'(c);
    p = p >>> 10;
    return p[15:0];
  endfunction

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("cycle %0d %s: got %h expected %h", n, what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] e3, e2;
    for (int i = 0; i < H; i++) begin
      hx[i] = '0; hy[i] = '0; hw[i] = '0; txa[i] = '0; tya[i] = '0; txb[i] = '0; tyb[i] = '0;
    end
    for (int i = 0; i < 4; i++) begin a3[i] = 12'($urandom); b3[i] = 12'($urandom); end
    for (int i = 0; i < 3; i++) begin a2[i] = 12'($urandom); b2[i] = 12'($urandom); end
    xi = '0; yi = '0; wi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      xi = 16'($urandom); yi = 16'($urandom); wi = 16'($urandom);
      xt3 = 12'($urandom); yt3 = 12'($urandom); xt2 = 6'($urandom); yt2 = 6'($urandom);
      hx[n + H] = xi; hy[n + H] = yi; hw[n + H] = wi;
      txa[n + H] = xt3; tya[n + H] = yt3; txb[n + H] = xt2; tyb[n + H] = yt2;
      #1;
      // N1 = 3: P = 4
      e3 = hw[n + H - 3];
      for (int i1 = 0; i1 <= 3; i1++)
        e3 += gq(hy[n + H - i1], b3[i1], int'(tya[n + H - i1][5:0]), int'(tya[n + H - i1][11:6]), i1, 0, 64)
            + gq(hx[n + H - 4 - i1], a3[i1], int'(txa[n + H - 4 - i1][5:0]),
                 int'(txa[n + H - 4 - i1][11:6]), i1, 0, 64);
      expect16(z3, e3, "N1=3 z", n);
      expect16(xo3, hx[n + H - 3], "N1=3 x_out", n);
      expect16(yo3, hy[n + H - 3], "N1=3 y_out", n);
      expect16(16'(xto3), 16'(txa[n + H - 3]), "N1=3 x tag", n);
      expect16(16'(yto3), 16'(tya[n + H - 3]), "N1=3 y tag", n);
      // N1 = 2, origin: P = 4, no b(0)
      e2 = hw[n + H - 3];
      for (int i1 = 0; i1 <= 2; i1++) begin
        if (i1 > 0)
          e2 += gq(hy[n + H - i1], b2[i1], int'(tyb[n + H - i1][2:0]), int'(tyb[n + H - i1][5:3]), i1, 1, 8);
        e2 += gq(hx[n + H - 4 - i1], a2[i1], int'(txb[n + H - 4 - i1][2:0]),
                 int'(txb[n + H - 4 - i1][5:3]), i1, 1, 8);
        if (int'(txb[n + H - 4 - i1][2:0]) + i1 >= 8 || int'(txb[n + H - 4 - i1][5:3]) + 1 >= 8) gated++;
      end
      expect16(z2, e2, "N1=2 z", n);
      expect16(yo2, hy[n + H - 3], "N1=2 y_out", n);
      @(negedge clk);
    end
    $display("products removed at the image border: %0d", gated);
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
