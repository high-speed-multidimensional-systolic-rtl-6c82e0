// ladder_pkg: shared constants and elaboration-time helpers of the
// multidimensional systolic ladder filter.
//
// The filter works on a raster-scanned signal: pixel index k1 runs fastest,
// then line index k2, then frame index k3, one pixel per clock.  A frame is
// K x K pixels, so one line register T2 holds K pixels and one frame register
// T3 holds K*K pixels (T3 = K^2 T1 = K T2).
//
// Word widths follow the published target of a 16 x 12 bit multiplication and a
// 16 bit addition per processing period: 16 bit data, 12 bit coefficients.
// The coefficient binary point (10 fractional bits) is this design's choice.
package ladder_pkg;

  localparam int unsigned DATA_W    = 16;  // pixel / partial-sum width
  localparam int unsigned COEF_W    = 12;  // programmable coefficient width
  localparam int unsigned COEF_FRAC = 10;  // fractional bits of a coefficient

  // Width of one pixel coordinate (column or row) in a K x K frame.
  function automatic int unsigned tag_w(input int unsigned k);
    return (k > 2) ? $clog2(k) : 1;
  endfunction

  // Number of two-coefficient PEs needed for the taps i1 = 0..n1
  // of one first-level section (b part or a part).
  function automatic int unsigned pairs(input int unsigned n1);
    return (n1 + 2) / 2;
  endfunction

  // Pixel registers on the forward (x, y bus) path inside one first-level
  // S3 structure: p2 = 2<N1/2> + 1.
  function automatic int unsigned p2_of(input int unsigned n1);
    return 2 * pairs(n1) - 1;
  endfunction

  // Length of the accumulation-path register that joins two neighbouring
  // lines: T2 - (m2 + q2) T1 with m2 = p2 + 1.  In this design the lower path
  // of a first-level structure holds q2 = p2 pixel registers.
  function automatic int unsigned line_gap(input int unsigned n1, input int unsigned k);
    return k - (p2_of(n1) + 1 + p2_of(n1));
  endfunction

  // Length of the accumulation-path register that joins the last line section
  // of frame tap i3 to the first of frame tap i3+1: T3 - (m3 + q3) T1 with
  // m3 = p3 + 1, p3 = N2 m2 + p2 and q3 = N2 (K - m2) + q2.
  function automatic int unsigned frame_gap(input int unsigned n1, input int unsigned n2,
                                            input int unsigned k);
    int unsigned m2, p3, q3;
    m2 = p2_of(n1) + 1;
    p3 = n2 * m2 + p2_of(n1);
    q3 = n2 * (k - m2) + p2_of(n1);
    return k * k - (p3 + 1 + q3);
  endfunction

  // Input latency of the whole structure in processing periods: the output
  // node carries y(n - LAT) where y is the filter response to x.
  function automatic int unsigned in_latency(input int unsigned n1);
    return 2 * pairs(n1);
  endfunction

  // --- dual S1-S1-S4 structure (one bus, two partial-sum lines) ---------
  // Each PE of a first-level S5 section covers two pixel taps of both the a
  // and the b coefficients, so a section has <N1/2> + 1 PEs and
  // p2 = <N1/2> pixel registers on its bus.
  function automatic int unsigned dual_p2(input int unsigned n1);
    return pairs(n1) - 1;
  endfunction

  // Bus store between a section and the next line section: K - (2 p2 + 1).
  function automatic int unsigned dual_line_gap(input int unsigned n1, input int unsigned k);
    return k - (2 * dual_p2(n1) + 1);
  endfunction

  // Bus store between the last line section of one frame tap and the first
  // section of the next: K^2 - (N2 K + 2 p2 + 1).
  function automatic int unsigned dual_frame_gap(input int unsigned n1, input int unsigned n2,
                                                 input int unsigned k);
    return k * k - (n2 * k + 2 * dual_p2(n1) + 1);
  endfunction

  // --- S2-S2-S3 structure (separate a and b ladders) ----------------------
  // Latency of the S2-S2-S3 filter in periods, y_out register included: the
  // partial-sum path of the recursive ladder, from the register that holds
  // the nonrecursive result to the output node, has
  // N2 K + N3 K^2 - (G - 1) NP + NP - 1 registers (G = (N2+1)(N3+1)
  // sections of NP = <N1/2> + 1 PEs), and y_out adds one.
  function automatic longint unsigned s2_latency(input int unsigned n1, input int unsigned n2,
                                                 input int unsigned n3, input int unsigned k);
    longint unsigned g, np;
    g  = (longint'(n2) + 1) * (longint'(n3) + 1);
    np = longint'(pairs(n1));
    return longint'(n2) * k + longint'(n3) * k * k - (g - 1) * np + np;
  endfunction

  // Raster index (row * K + column) that is d pixels before index 0,
  // i.e. (-d) mod K^2.
  function automatic int unsigned raster_back(input longint unsigned d, input int unsigned k);
    longint unsigned f;
    f = longint'(k) * longint'(k);
    return int'((f - (d % f)) % f);
  endfunction

endpackage
