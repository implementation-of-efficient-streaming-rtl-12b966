// dbf_ref_pkg: reference model of the deblocking filter for the testbenches.
//
// Written independently of the RTL as plain sequential code on integers:
// the H.264/AVC normal-edge filter with its alpha, beta and tc0 tables
// (indexed over the whole QP range 0..51), and a whole-picture model that
// processes 8x8 blocks in raster order the way the actor does: left edge,
// column-4 edge, top edge, row-4 edge, with the already filtered left and
// upper blocks as read-only context.
package dbf_ref_pkg;

  int ALPHA_T [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,
    101,113,127,144,162,182,203,226,255,255};
  int BETA_T [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,
    16,16,17,17,18,18};
  // tc0 as (bS1, bS2, bS3) triples for QP 0..51
  int TC0_T [52][3] = '{
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},
    '{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},
    '{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},
    '{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},
    '{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int clip(int lo, int hi, int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int alpha_of(int qp); return ALPHA_T[qp > 51 ? 51 : qp]; endfunction
  function automatic int beta_of(int qp);  return BETA_T[qp > 51 ? 51 : qp];  endfunction
  function automatic int tc0_of(int qp, int bs);
    if (bs == 0) return 0;
    return TC0_T[qp > 51 ? 51 : qp][bs - 1];
  endfunction

  // v[0..7] = p3 p2 p1 p0 q0 q1 q2 q3, filtered in place
  function automatic void filter8(ref int v[8], input int qp, input int bs, input bit chroma);
    int p0, p1, p2, q0, q1, q2, a, b, t0, tc, d;
    bit ap, aq;
    p0 = v[3]; p1 = v[2]; p2 = v[1]; q0 = v[4]; q1 = v[5]; q2 = v[6];
    a = alpha_of(qp); b = beta_of(qp); t0 = tc0_of(qp, bs);
    if (bs == 0) return;
    if (!(iabs(p0 - q0) < a && iabs(p1 - p0) < b && iabs(q1 - q0) < b)) return;
    ap = iabs(p2 - p0) < b;
    aq = iabs(q2 - q0) < b;
    tc = chroma ? t0 + 1 : t0 + int'(ap) + int'(aq);
    d = clip(-tc, tc, ((q0 - p0) * 4 + (p1 - q1) + 4) >>> 3);
    v[3] = clip(0, 255, p0 + d);
    v[4] = clip(0, 255, q0 - d);
    if (!chroma) begin
      if (ap) v[2] = p1 + clip(-t0, t0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1);
      if (aq) v[5] = q1 + clip(-t0, t0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1);
    end
  endfunction

  // Deblock a picture of wb x hb blocks in place (pix[y][x], 0..255).
  function automatic void deblock_frame(ref int pix[][], input int wb, input int hb,
                                        input int qp, input int bs, input bit chroma);
    int v[8];
    for (int by = 0; by < hb; by++)
      for (int bx = 0; bx < wb; bx++) begin
        int x0, y0;
        x0 = bx * 8; y0 = by * 8;
        // horizontal pass, row by row: left edge then column-4 edge
        for (int r = 0; r < 8; r++) begin
          if (bx > 0) begin
            for (int i = 0; i < 8; i++) v[i] = pix[y0 + r][x0 - 4 + i];
            filter8(v, qp, bs, chroma);
            for (int i = 4; i < 8; i++) pix[y0 + r][x0 - 4 + i] = v[i];  // current block only
          end
          for (int i = 0; i < 8; i++) v[i] = pix[y0 + r][x0 + i];
          filter8(v, qp, bs, chroma);
          for (int i = 0; i < 8; i++) pix[y0 + r][x0 + i] = v[i];
        end
        // vertical pass, column by column: top edge then row-4 edge
        for (int c = 0; c < 8; c++) begin
          if (by > 0) begin
            for (int i = 0; i < 8; i++) v[i] = pix[y0 - 4 + i][x0 + c];
            filter8(v, qp, bs, chroma);
            for (int i = 4; i < 8; i++) pix[y0 - 4 + i][x0 + c] = v[i];
          end
          for (int i = 0; i < 8; i++) v[i] = pix[y0 + i][x0 + c];
          filter8(v, qp, bs, chroma);
          for (int i = 0; i < 8; i++) pix[y0 + i][x0 + c] = v[i];
        end
      end
  endfunction

  // A test picture with blocky structure: a per-block level plus small noise,
  // so that block edges show steps the filter will smooth.
  function automatic void make_picture(ref int pix[][], input int wb, input int hb, input int seed);
    int lvl;
    pix = new[hb * 8];
    for (int y = 0; y < hb * 8; y++) pix[y] = new[wb * 8];
    for (int by = 0; by < hb; by++)
      for (int bx = 0; bx < wb; bx++) begin
        lvl = 40 + ((bx * 37 + by * 53 + seed * 11) % 160);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            pix[by * 8 + y][bx * 8 + x] = clip(0, 255, lvl + int'($urandom_range(0, 6)) - 3
                                             + ((x >= 4) ? 4 : 0) + ((y >= 4) ? -3 : 0));
      end
  endfunction

endpackage
