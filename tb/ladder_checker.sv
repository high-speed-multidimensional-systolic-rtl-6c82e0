// ladder_checker: stimulus and reference model for md_ladder_s1s1s3 and,
// with DUAL = 1, for md_ladder_dual.
//
// It programs random coefficients, drives NS random pixels, one per clock on
// the falling edge, and compares every output sample with a direct
// evaluation of the 3-D difference equation on the raster-scanned signal
// (tap (i1,i2,i3) is a delay of i1 + K i2 + K^2 i3 pixels), using the same
// fixed-point rules as the filter: each product keeps bits
// [FRAC +: W] of the full product, and sums wrap at W bits.  Pixel 0 is
// taken by the first rising edge after reset; the output after edge n must
// be the response to the pixel taken at edge n - LAT (LAT = 2<N1/2> + 2),
// and zero before that.  It also counts how often a recursive
// tap, a line-register tap and a frame-register tap contributed a non-zero
// value, so a test shows that each path was exercised.  With ZB = 1 it sets
// the filter's zero-boundary mode and the reference treats pixels outside
// the K x K image as zero; border_hits counts taps that this removed.
// With DUAL = 1 the reference is the canonic form computed by the dual
// structure, with the same product rounding applied to the state v:
//   v(m) = x(m) + sum_{i != 0} q(b(i) v(m - D(i))),  y(m) = sum_i q(a(i) v(m - D(i))),
// and the latency is LAT = 1.  LATO overrides the latency (used for the
// S2-S2-S3 filter, whose output is the direct form after a longer delay, and
// for S1-S1-S1, whose output register holds the response to the pixel taken
// on the same edge, LATO = 0).
module ladder_checker #(
  parameter int unsigned W    = 16,
  parameter int unsigned CW   = 12,
  parameter int unsigned FRAC = 10,
  parameter int unsigned N1   = 3,
  parameter int unsigned N2   = 1,
  parameter int unsigned N3   = 1,
  parameter int unsigned K    = 64,
  parameter int unsigned NS   = 3 * K * K,
  parameter int unsigned SEED = 1,
  parameter bit          ZB   = 1'b0,
  parameter bit          DUAL = 1'b0,
  parameter int          LATO = -1      // latency override, -1: structure default
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 zb_en,
  output logic signed [CW-1:0] a_coef [N3+1][N2+1][N1+1],
  output logic signed [CW-1:0] b_coef [N3+1][N2+1][N1+1],
  output logic signed [W-1:0]  x,
  input  logic signed [W-1:0]  y,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   rec_hits,
  output int                   line_hits,
  output int                   frame_hits,
  output int                   border_hits
);

  localparam int unsigned LAT = (LATO >= 0) ? int'(LATO) : DUAL ? 1 : 2 * ((N1 + 2) / 2);

  logic [W-1:0] xs [NS];
  logic [W-1:0] ys [NS];
  logic [W-1:0] vs [NS];   // state of the canonic form (DUAL = 1)

  function automatic logic [W-1:0] qmul(input logic [W-1:0] v, input logic signed [CW-1:0] c);
    longint p;
    p = longint'($signed(v)) * longint'(c);
    p = p >>> FRAC;
    return p[W-1:0];
  endfunction

  initial begin : stim
    int unsigned s;
    int t;
    logic [W-1:0] acc, term, vacc;
    bit rec, lin, frm, in_img;
    s = $urandom(SEED);
    checks = 0; failures = 0; rec_hits = 0; line_hits = 0; frame_hits = 0; border_hits = 0;
    zb_en = ZB;
    done = 1'b0;
    x = '0;
    for (int i3 = 0; i3 <= int'(N3); i3++)
      for (int i2 = 0; i2 <= int'(N2); i2++)
        for (int i1 = 0; i1 <= int'(N1); i1++) begin
          a_coef[i3][i2][i1] = CW'($signed($urandom_range(0, (1 << CW) - 1)));
          b_coef[i3][i2][i1] = CW'($signed($urandom_range(0, 127)) - 64);
        end
    for (int m = 0; m < int'(NS); m++) xs[m] = W'($signed($urandom_range(0, 4095)) - 2048);
    // reference response
    for (int m = 0; m < int'(NS); m++) begin
      acc = '0; rec = 0; lin = 0; frm = 0;
      vacc = xs[m];
      // canonic form: state first (taps with t != m), then output from it
      if (DUAL) begin
        for (int i3 = 0; i3 <= int'(N3); i3++)
          for (int i2 = 0; i2 <= int'(N2); i2++)
            for (int i1 = 0; i1 <= int'(N1); i1++) begin
              t = m - (i1 + int'(K) * i2 + int'(K * K) * i3);
              in_img = !ZB || ((m % int'(K)) >= i1 && ((m / int'(K)) % int'(K)) >= i2);
              if (t >= 0 && t != m && in_img) vacc += qmul(vs[t], b_coef[i3][i2][i1]);
            end
        vs[m] = vacc;
      end
      for (int i3 = 0; i3 <= int'(N3); i3++)
        for (int i2 = 0; i2 <= int'(N2); i2++)
          for (int i1 = 0; i1 <= int'(N1); i1++) begin
            t = m - (i1 + int'(K) * i2 + int'(K * K) * i3);
            in_img = !ZB || ((m % int'(K)) >= i1 && ((m / int'(K)) % int'(K)) >= i2);
            if (t >= 0 && !in_img) border_hits++;
            if (t >= 0 && in_img) begin
              term = qmul(DUAL ? vs[t] : xs[t], a_coef[i3][i2][i1]);
              acc += term;
              if (term != 0 && i2 > 0) lin = 1;
              if (term != 0 && i3 > 0) frm = 1;
              if (t != m) begin
                term = qmul(DUAL ? vs[t] : ys[t], b_coef[i3][i2][i1]);
                if (!DUAL) acc += term;
                if (term != 0) rec = 1;
                if (term != 0 && i2 > 0) lin = 1;
                if (term != 0 && i3 > 0) frm = 1;
              end
            end
          end
      ys[m] = acc;
      rec_hits += int'(rec); line_hits += int'(lin); frame_hits += int'(frm);
    end
    x = $signed(xs[0]);
    @(posedge rst_n);
    for (int n = 0; n < int'(NS + LAT); n++) begin
      @(negedge clk);
      checks++;
      if (n >= int'(LAT)) begin
        if (y !== $signed(ys[n - LAT])) begin
          failures++;
          if (failures <= 10)
            $display("mismatch at sample %0d: got %0d expected %0d", n - LAT, y, $signed(ys[n - LAT]));
        end
      end else if (y !== '0) begin
        failures++;
        if (failures <= 10) $display("output %0d before latency: got %0d, expected 0", n, y);
      end
      x = (n + 1 < int'(NS)) ? $signed(xs[n + 1]) : '0;
    end
    done = 1'b1;
  end

endmodule
