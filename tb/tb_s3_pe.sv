// tb_s3_pe: checks the two-coefficient ladder PE in two forms: a registered
// PE on the y bus (K = 8, taps i1 = 4, 5, line tap i2 = 5) and the
// register-less first PE of a section on the x bus (K = 10, taps i1 = 2, 3).
// Random bus values, {row, column} tags, partial sums and coefficients are
// applied every clock, with the zero-boundary mode on in the first half and
// off in the second.  The outputs are compared with
//   registered:    z(t+1) = w(t) + g1 q(c1 s(t-1)) + g2 q(c2 s(t-2)), bus out = s(t-1)
//   register-less: z(t)   = w(t) + g1 q(c1 s(t))   + g2 q(c2 s(t-1)), bus out = s(t)
// where q() keeps product bits [10 +: 16], sums wrap at 16 bits, and the
// gate g of a tap i1 is 0 when the mode is on and the sample's
// column + i1 >= K or row + i2 >= K.
module tb_s3_pe;
  localparam int NCYC = 400;
  localparam int KA = 8,  TA = 4, IA = 5;   // registered PE
  localparam int KB = 10, TB = 2, IB = 0;   // register-less PE
  localparam int AWA = 3, AWB = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic zb_en;
  logic signed [11:0] c1, c2;
  logic signed [15:0] xi, yi, wi;
  logic signed [15:0] xo0, yo0, z0, xo1, yo1, z1;
  logic [2*AWA-1:0] xta, yta, xtao, ytao;
  logic [2*AWB-1:0] xtb, ytb, xtbo, ytbo;
  int checks = 0, failures = 0, gated = 0;

  // per-cycle histories, offset by 2
  logic [15:0] hx [NCYC+4], hy [NCYC+4], hw [NCYC+4];
  logic [2*AWA-1:0] hta [NCYC+4];
  logic [2*AWB-1:0] htb [NCYC+4];
  logic hz [NCYC+4];

  always #5 clk = ~clk;

  s3_pe #(.K(KA), .TAP1(TA), .I2(IA)) dut_reg (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .c_first(c1), .c_second(c2),
    .x_in(xi), .y_in(yi), .xt_in(xta), .yt_in(yta),
    .x_out(xo0), .y_out(yo0), .xt_out(xtao), .yt_out(ytao), .w_in(wi), .z_out(z0));

  s3_pe #(.K(KB), .TAP1(TB), .I2(IB), .USE_X(1'b1), .REG(1'b0)) dut_comb (
    .clk(clk), .rst_n(rst_n), .zb_en(zb_en), .c_first(c1), .c_second(c2),
    .x_in(xi), .y_in(yi), .xt_in(xtb), .yt_in(ytb),
    .x_out(xo1), .y_out(yo1), .xt_out(xtbo), .yt_out(ytbo), .w_in(wi), .z_out(z1));

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
    c1 = 12'sd0; c2 = 12'sd0; xi = '0; yi = '0; wi = '0; zb_en = 1'b1;
    xta = '0; yta = '0; xtb = '0; ytb = '0;
    for (int i = 0; i < 2; i++) begin
      hx[i] = '0; hy[i] = '0; hw[i] = '0; hta[i] = '0; htb[i] = '0; hz[i] = 1'b1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      if (n == NCYC / 2) begin
        // second half: new coefficients, mode off, histories restarted by reset
        rst_n = 1'b0; #1 rst_n = 1'b1;
        zb_en = 1'b0;
        hx[n] = '0; hx[n + 1] = '0; hy[n] = '0; hy[n + 1] = '0;
        hta[n] = '0; hta[n + 1] = '0; htb[n] = '0; htb[n + 1] = '0;
        hz[n] = 1'b0; hz[n + 1] = 1'b0;
      end
      if (n == 0 || n == NCYC / 2) begin
        c1 = 12'($urandom);
        c2 = 12'($urandom);
      end
      xi = 16'($urandom); yi = 16'($urandom); wi = 16'($urandom);
      xta = 6'($urandom); yta = 6'($urandom); xtb = 8'($urandom); ytb = 8'($urandom);
      hx[n + 2] = xi; hy[n + 2] = yi; hw[n + 2] = wi;
      hta[n + 2] = yta; htb[n + 2] = xtb; hz[n + 2] = zb_en;
      #1;
      // register-less PE on the x bus, combinational from the current inputs
      e = wi
        + gq(hx[n + 2], c1, int'(htb[n + 2][3:0]), int'(htb[n + 2][7:4]), TB, IB, KB, hz[n + 2])
        + gq(hx[n + 1], c2, int'(htb[n + 1][3:0]), int'(htb[n + 1][7:4]), TB + 1, IB, KB, hz[n + 1]);
      expect16(z1, e, "comb z", n);
      expect16(xo1, xi, "comb x_out", n);
      expect16(16'(xtbo), 16'(xtb), "comb x tag", n);
      @(negedge clk);
      // registered PE on the y bus, one clock after applying sample n
      e = hw[n + 2]
        + gq(hy[n + 1], c1, int'(hta[n + 1][2:0]), int'(hta[n + 1][5:3]), TA, IA, KA, hz[n + 1])
        + gq(hy[n], c2, int'(hta[n][2:0]), int'(hta[n][5:3]), TA + 1, IA, KA, hz[n]);
      if (hz[n + 1] && (int'(hta[n + 1][2:0]) + TA >= KA || int'(hta[n + 1][5:3]) + IA >= KA))
        gated++;
      expect16(z0, e, "reg z", n);
      expect16(yo0, yi, "reg y_out", n);
      expect16(xo0, xi, "reg x_out", n);
      expect16(16'(ytao), 16'(yta), "reg y tag", n);
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
