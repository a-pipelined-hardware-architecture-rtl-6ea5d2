// dbf_ref_pkg: reference model of the H.264 edge filter and boundary-strength rules, used by
// the testbenches to work out expected results independently of the RTL. Written directly
// from the arithmetic of H.264 clause 8.7 with its own copy of the alpha/beta/tC0 tables.
package dbf_ref_pkg;

  localparam int ALPHA [52] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,
    50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  localparam int BETA [52] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,
    11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  // tC0 for bS = 1, 2, 3
  localparam int TC0 [52][3] = '{
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,1},'{0,0,1},'{0,0,1},
    '{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},
    '{1,1,2},'{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},
    '{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},'{9,12,18},
    '{10,13,20},'{11,15,23},'{13,17,25}};

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // s[0..3] = p3 p2 p1 p0, s[4..7] = q0 q1 q2 q3 (a line in picture order); filtered in place
  function automatic void filter_line(ref int s[8], input int bs, input bit chroma,
                                      input int ia, input int ib);
    int p0, p1, p2, p3, q0, q1, q2, q3, alpha, beta, ap, aq, tc0, tc, d;
    p3 = s[0]; p2 = s[1]; p1 = s[2]; p0 = s[3];
    q0 = s[4]; q1 = s[5]; q2 = s[6]; q3 = s[7];
    alpha = ALPHA[ia]; beta = BETA[ib];
    if (bs == 0) return;
    if (!(iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta)) return;
    ap = iabs(p2 - p0); aq = iabs(q2 - q0);
    if (bs < 4) begin
      tc0 = TC0[ia][bs - 1];
      tc  = chroma ? tc0 + 1 : tc0 + ((ap < beta) ? 1 : 0) + ((aq < beta) ? 1 : 0);
      d   = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
      s[3] = clip3(0, 255, p0 + d);
      s[4] = clip3(0, 255, q0 - d);
      if (!chroma && ap < beta) s[2] = p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >> 1) - (p1 * 2)) >>> 1);
      if (!chroma && aq < beta) s[5] = q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >> 1) - (q1 * 2)) >>> 1);
    end else begin
      if (!chroma && ap < beta && iabs(p0 - q0) < ((alpha >> 2) + 2)) begin
        s[3] = (p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >> 3;
        s[2] = (p2 + p1 + p0 + q0 + 2) >> 2;
        s[1] = (2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >> 3;
      end else begin
        s[3] = (2 * p1 + p0 + q1 + 2) >> 2;
      end
      if (!chroma && aq < beta && iabs(p0 - q0) < ((alpha >> 2) + 2)) begin
        s[4] = (p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >> 3;
        s[5] = (p0 + q0 + q1 + q2 + 2) >> 2;
        s[6] = (2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >> 3;
      end else begin
        s[4] = (2 * q1 + q0 + p1 + 2) >> 2;
      end
    end
  endfunction

  // boundary strength, frame coding, one reference list
  function automatic int bs_rule(bit mb_edge, bit intra_p, bit intra_q, bit nz_p, bit nz_q,
                                 int ref_p, int ref_q, int mvx_p, int mvx_q,
                                 int mvy_p, int mvy_q);
    if ((intra_p || intra_q) && mb_edge) return 4;
    if (intra_p || intra_q) return 3;
    if (nz_p || nz_q) return 2;
    if (ref_p != ref_q || iabs(mvx_p - mvx_q) >= 4 || iabs(mvy_p - mvy_q) >= 4) return 1;
    return 0;
  endfunction

  function automatic int idx_clip(int qpav, int off);
    return clip3(0, 51, qpav + off);
  endfunction

endpackage
