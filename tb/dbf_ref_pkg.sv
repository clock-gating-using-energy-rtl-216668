// dbf_ref_pkg: reference model of the deblocking filter for the testbenches.
//
// Written apart from the RTL, on plain integer arrays: samples are
// x[line][k] with k = 0..7 running p3 p2 p1 p0 | q0 q1 q2 q3 across the edge.
// It holds the HEVC beta/tc tables as literal lists (the RTL computes them),
// the luma strong/normal filters, the chroma filter and a token-level model,
// plus a random token generator that biases samples towards smooth ramps
// with a step, so that every filter mode is reached.
package dbf_ref_pkg;
  import dbf_pkg::*;

  localparam int TC_TABLE [54] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,3,4,4,4,5,5,6,6,7,8,
    9,10,11,13,14,16,18,20,22,24};

  localparam int BETA_TABLE [52] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    6,7,8,9,10,11,12,13,14,15,16,17,18,
    20,22,24,26,28,30,32,34,36,38,40,42,44,46,48,50,52,54,56,58,60,62,64};

  function automatic int lim(int v, int lo, int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int ab(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int ref_beta(int qp, int boff);
    return BETA_TABLE[lim(qp + boff * 2, 0, 51)];
  endfunction

  function automatic int ref_tc(int qp, int bs, int toff);
    return TC_TABLE[lim(qp + 2 * bs - 2 + toff * 2, 0, 53)];
  endfunction

  typedef int seg_arr_t [4][8];

  function automatic seg_arr_t to_arr(dbf_seg_t s);
    seg_arr_t a;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 4; k++) begin
        a[l][3 - k] = int'(s[l].p[k]);
        a[l][4 + k] = int'(s[l].q[k]);
      end
    return a;
  endfunction

  function automatic dbf_seg_t from_arr(seg_arr_t a);
    dbf_seg_t s;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 4; k++) begin
        s[l].p[k] = sample_t'(a[l][3 - k]);
        s[l].q[k] = sample_t'(a[l][4 + k]);
      end
    return s;
  endfunction

  // Filters a segment in place; returns the mode used.
  function automatic dbf_mode_t ref_segment(ref seg_arr_t x, input bit chroma,
                                            input int bs, input int beta, input int tc);
    int dpl [2], dql [2];
    int lines [2] = '{0, 3};
    int dsum, lim_side, dd;
    bit sam [2];
    bit ep, eq;
    seg_arr_t y;
    y = x;
    if (chroma) begin
      if (bs != 2) return DBF_SKIP;
      for (int l = 0; l < 4; l++) begin
        dd = lim(((x[l][4] - x[l][3]) * 4 + x[l][2] - x[l][5] + 4) >>> 3, -tc, tc);
        y[l][3] = lim(x[l][3] + dd, 0, 255);
        y[l][4] = lim(x[l][4] - dd, 0, 255);
      end
      x = y;
      return DBF_CHROMA;
    end
    if (bs == 0) return DBF_SKIP;
    for (int i = 0; i < 2; i++) begin
      int l = lines[i];
      dpl[i] = ab(x[l][1] - 2 * x[l][2] + x[l][3]);
      dql[i] = ab(x[l][6] - 2 * x[l][5] + x[l][4]);
    end
    dsum = dpl[0] + dql[0] + dpl[1] + dql[1];
    if (dsum >= beta) return DBF_SKIP;
    for (int i = 0; i < 2; i++) begin
      int l = lines[i];
      sam[i] = (2 * (dpl[i] + dql[i]) < beta / 4) &&
               (ab(x[l][0] - x[l][3]) + ab(x[l][4] - x[l][7]) < beta / 8) &&
               (ab(x[l][3] - x[l][4]) < (5 * tc + 1) / 2);
    end
    lim_side = (beta + beta / 2) / 8;
    ep = (dpl[0] + dpl[1]) < lim_side;
    eq = (dql[0] + dql[1]) < lim_side;
    if (sam[0] && sam[1]) begin
      for (int l = 0; l < 4; l++) begin
        int P3 = x[l][0], P2 = x[l][1], P1 = x[l][2], P0 = x[l][3];
        int Q0 = x[l][4], Q1 = x[l][5], Q2 = x[l][6], Q3 = x[l][7];
        y[l][3] = lim((P2 + 2*P1 + 2*P0 + 2*Q0 + Q1 + 4) / 8, P0 - 2*tc, P0 + 2*tc);
        y[l][2] = lim((P2 + P1 + P0 + Q0 + 2) / 4,          P1 - 2*tc, P1 + 2*tc);
        y[l][1] = lim((2*P3 + 3*P2 + P1 + P0 + Q0 + 4) / 8, P2 - 2*tc, P2 + 2*tc);
        y[l][4] = lim((P1 + 2*P0 + 2*Q0 + 2*Q1 + Q2 + 4) / 8, Q0 - 2*tc, Q0 + 2*tc);
        y[l][5] = lim((P0 + Q0 + Q1 + Q2 + 2) / 4,          Q1 - 2*tc, Q1 + 2*tc);
        y[l][6] = lim((P0 + Q0 + Q1 + 3*Q2 + 2*Q3 + 4) / 8, Q2 - 2*tc, Q2 + 2*tc);
      end
      x = y;
      return DBF_STRONG;
    end
    for (int l = 0; l < 4; l++) begin
      int P2 = x[l][1], P1 = x[l][2], P0 = x[l][3];
      int Q0 = x[l][4], Q1 = x[l][5], Q2 = x[l][6];
      int dl = (9 * (Q0 - P0) - 3 * (Q1 - P1) + 8) >>> 4;
      if (ab(dl) < 10 * tc) begin
        dl = lim(dl, -tc, tc);
        y[l][3] = lim(P0 + dl, 0, 255);
        y[l][4] = lim(Q0 - dl, 0, 255);
        if (ep) y[l][2] = lim(P1 + lim((((P2 + P0 + 1) >> 1) - P1 + dl) >>> 1, -(tc >> 1), tc >> 1), 0, 255);
        if (eq) y[l][5] = lim(Q1 + lim((((Q2 + Q0 + 1) >> 1) - Q1 - dl) >>> 1, -(tc >> 1), tc >> 1), 0, 255);
      end
    end
    x = y;
    return DBF_NORMAL;
  endfunction

  typedef dbf_mode_t modes_t [N_UNITS];

  function automatic dbf_token_t ref_token(dbf_token_t t, int boff, int toff, output modes_t m);
    dbf_token_t o = t;
    int beta = ref_beta(int'(t.qp), boff);
    for (int u = 0; u < N_UNITS; u++) begin
      seg_arr_t a = to_arr(t.seg[u]);
      m[u] = ref_segment(a, t.chroma, int'(t.bs[u]), beta, ref_tc(int'(t.qp), int'(t.bs[u]), toff));
      o.seg[u] = from_arr(a);
    end
    return o;
  endfunction

  // Random segment: a ramp or flat area per side, a step at the edge and
  // some noise, with all three kept small or large at random.
  function automatic dbf_seg_t rand_seg();
    seg_arr_t a;
    int base  = 40 + int'($urandom_range(0, 170));
    int step  = int'($urandom_range(0, 40)) - 20;
    int slope = int'($urandom_range(0, 4)) - 2;
    int noise = ($urandom_range(0, 3) == 0) ? 12 : (($urandom_range(0, 1) == 1) ? 2 : 0);
    if ($urandom_range(0, 7) == 0) step = int'($urandom_range(0, 200)) - 100;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 8; k++)
        a[l][k] = lim(base + slope * k + (k >= 4 ? step : 0)
                      + (noise > 0 ? int'($urandom_range(0, noise)) - noise / 2 : 0), 0, 255);
    return from_arr(a);
  endfunction

  function automatic dbf_token_t rand_token();
    dbf_token_t t;
    t.chroma = ($urandom_range(0, 4) == 0);
    t.qp     = 6'($urandom_range(14, 51));
    for (int u = 0; u < N_UNITS; u++) begin
      t.bs[u]  = 2'($urandom_range(0, 2));
      t.seg[u] = rand_seg();
    end
    return t;
  endfunction

endpackage
