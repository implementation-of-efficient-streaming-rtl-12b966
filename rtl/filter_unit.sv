// filter_unit: one deblocking filter unit, with a luma and a chroma filter
// working side by side on the same line; chroma selects which result leaves.
//
// Input is one line of eight pixels p3..p0 | q0..q3 across a block edge and
// the limits from threshold_derivation. The edge is filtered only if bS > 0
// and |p0-q0| < alpha, |p1-p0| < beta and |q1-q0| < beta; a large step is
// taken to be a real image edge and left alone. Then:
//   delta = clip(-tc, tc, (4*(q0-p0) + (p1-q1) + 4) >> 3)
//   p0' = p0 + delta, q0' = q0 - delta (clipped to 0..255)
// Luma: tc = tc0 + [|p2-p0| < beta] + [|q2-q0| < beta], and where such a
// side test holds, p1 (or q1) also moves by
//   clip(-tc0, tc0, (p2 + ((p0+q0+1) >> 1) - 2*p1) >> 1).
// Chroma: tc = tc0 + 1 and only p0, q0 change. p3, q3 pass unchanged.
// Purely combinational.
//
// The luma/chroma split inside each filter unit follows the deblocking-filter
// architecture; the filter equations are this design's choice, the normal
// (bS < 4) filter of H.264/AVC. The strong bS = 4 filter is not included.
module filter_unit
  import dbf_pkg::*;
(
  input  edge_line_t line_in,
  input  thresh_t    th,
  input  logic       chroma,
  output edge_line_t line_out
);
  typedef logic signed [11:0] sval_t;   // wide enough for every intermediate

  function automatic sval_t absdiff(input pixel_t a, input pixel_t b);
    return (a > b) ? sval_t'({4'd0, a - b}) : sval_t'({4'd0, b - a});
  endfunction

  function automatic sval_t clip3(input sval_t lo, input sval_t hi, input sval_t v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic pixel_t clip1(input sval_t v);
    return (v < 0) ? 8'd0 : ((v > 255) ? 8'd255 : v[7:0]);
  endfunction

  function automatic sval_t ext(input pixel_t v);
    return sval_t'({4'd0, v});
  endfunction

  edge_line_t luma, chro;
  logic       do_filter, ap_ok, aq_ok;
  sval_t      p0, p1, p2, q0, q1, q2, tc0, tc_l, tc_c, d_l, d_c, avg, base, dp1, dq1;
  sval_t      alpha, beta;

  always_comb begin
    p0 = ext(line_in.p[0]); p1 = ext(line_in.p[1]); p2 = ext(line_in.p[2]);
    q0 = ext(line_in.q[0]); q1 = ext(line_in.q[1]); q2 = ext(line_in.q[2]);
    tc0   = sval_t'({7'd0, th.tc0});
    alpha = sval_t'({4'd0, th.alpha});
    beta  = sval_t'({7'd0, th.beta});
    avg   = (p0 + q0 + 12'sd1) >>> 1;

    do_filter = th.enable
             && (absdiff(line_in.p[0], line_in.q[0]) < alpha)
             && (absdiff(line_in.p[1], line_in.p[0]) < beta)
             && (absdiff(line_in.q[1], line_in.q[0]) < beta);
    ap_ok = absdiff(line_in.p[2], line_in.p[0]) < beta;
    aq_ok = absdiff(line_in.q[2], line_in.q[0]) < beta;

    base = (((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3;
    tc_l = tc0 + sval_t'({11'd0, ap_ok}) + sval_t'({11'd0, aq_ok});
    tc_c = tc0 + 12'sd1;
    d_l  = clip3(-tc_l, tc_l, base);
    d_c  = clip3(-tc_c, tc_c, base);
    dp1  = clip3(-tc0, tc0, (p2 + avg - (p1 <<< 1)) >>> 1);
    dq1  = clip3(-tc0, tc0, (q2 + avg - (q1 <<< 1)) >>> 1);

    // luma path
    luma = line_in;
    if (do_filter) begin
      luma.p[0] = clip1(p0 + d_l);
      luma.q[0] = clip1(q0 - d_l);
      if (ap_ok) luma.p[1] = clip1(p1 + dp1);
      if (aq_ok) luma.q[1] = clip1(q1 + dq1);
    end

    // chroma path
    chro = line_in;
    if (do_filter) begin
      chro.p[0] = clip1(p0 + d_c);
      chro.q[0] = clip1(q0 - d_c);
    end

    line_out = chroma ? chro : luma;
  end

endmodule
