// filter_unit: edge filter for one four-line segment, luma and chroma.
//
// Luma: the segment is filtered only when bS > 0 and the second-difference
// activity d = sum over lines 0 and 3 of |p2-2p1+p0| + |q2-2q1+q0| is below
// beta (a smooth area that shows a step at the edge). Lines 0 and 3 then
// decide between the strong filter, which rewrites three samples on each
// side with low-pass averages clipped to +-2tc, and the normal filter,
// which moves p0/q0 by a clipped offset and, where that side is smooth
// enough, p1/q1 by half of it. Chroma: with bS == 2, p0 and q0 of each line
// move by a clipped offset; nothing else changes.
//
// The paper places one luma and one chroma filter in each filter unit and
// uses four units (two horizontal, two vertical). The decisions and filter
// equations are those of the HEVC deblocking filter, this design's choice.
// Which edge direction a unit serves only changes how its samples were
// gathered, so all four units are this same module.
//
// Purely combinational: seg_out and mode follow seg_in, chroma, bs, beta
// and tc. The outermost samples p[3] and q[3] are read by the decisions but
// never modified, so those bits of seg_out copy seg_in.
module filter_unit
  import dbf_pkg::*;
(
  input  dbf_seg_t          seg_in,
  input  logic              chroma,
  input  logic [1:0]        bs,
  input  logic [BETA_W-1:0] beta,
  input  logic [TC_W-1:0]   tc,
  output dbf_seg_t          seg_out,
  output dbf_mode_t         mode
);

  localparam int MAXV = (1 << BITDEPTH) - 1;

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic sample_t s(int v);
    return sample_t'(clip3(0, MAXV, v));
  endfunction

  // Second difference on one side of the edge.
  function automatic int d2(sample_t a2, sample_t a1, sample_t a0);
    return iabs(int'(a2) - 2 * int'(a1) + int'(a0));
  endfunction

  // Strong-filter decision for one line.
  function automatic logic strong_ok(dbf_line_t l, int dpq, int b, int t);
    return (2 * dpq < (b >>> 2)) &&
           (iabs(int'(l.p[3]) - int'(l.p[0])) + iabs(int'(l.q[0]) - int'(l.q[3])) < (b >>> 3)) &&
           (iabs(int'(l.p[0]) - int'(l.q[0])) < ((5 * t + 1) >>> 1));
  endfunction

  // Filter one line of the segment in the given mode.
  function automatic dbf_line_t filter_line(dbf_line_t l, dbf_mode_t m, int t,
                                            logic de_p, logic de_q);
    int p0, p1, p2, p3, q0, q1, q2, q3, delta, dlt;
    dbf_line_t o;
    o  = l;
    p0 = int'(l.p[0]); p1 = int'(l.p[1]); p2 = int'(l.p[2]); p3 = int'(l.p[3]);
    q0 = int'(l.q[0]); q1 = int'(l.q[1]); q2 = int'(l.q[2]); q3 = int'(l.q[3]);
    delta = 0;
    dlt   = 0;
    unique case (m)
      DBF_STRONG: begin
        o.p[0] = s(clip3(p0 - 2 * t, p0 + 2 * t, (p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3));
        o.p[1] = s(clip3(p1 - 2 * t, p1 + 2 * t, (p2 + p1 + p0 + q0 + 2) >>> 2));
        o.p[2] = s(clip3(p2 - 2 * t, p2 + 2 * t, (2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3));
        o.q[0] = s(clip3(q0 - 2 * t, q0 + 2 * t, (p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3));
        o.q[1] = s(clip3(q1 - 2 * t, q1 + 2 * t, (p0 + q0 + q1 + q2 + 2) >>> 2));
        o.q[2] = s(clip3(q2 - 2 * t, q2 + 2 * t, (p0 + q0 + q1 + 3 * q2 + 2 * q3 + 4) >>> 3));
      end
      DBF_NORMAL: begin
        delta = (9 * (q0 - p0) - 3 * (q1 - p1) + 8) >>> 4;
        if (iabs(delta) < t * 10) begin
          delta  = clip3(-t, t, delta);
          o.p[0] = s(p0 + delta);
          o.q[0] = s(q0 - delta);
          if (de_p) begin
            dlt    = clip3(-(t >>> 1), t >>> 1, (((p2 + p0 + 1) >>> 1) - p1 + delta) >>> 1);
            o.p[1] = s(p1 + dlt);
          end
          if (de_q) begin
            dlt    = clip3(-(t >>> 1), t >>> 1, (((q2 + q0 + 1) >>> 1) - q1 - delta) >>> 1);
            o.q[1] = s(q1 + dlt);
          end
        end
      end
      DBF_CHROMA: begin
        delta  = clip3(-t, t, ((((q0 - p0) <<< 2) + p1 - q1 + 4) >>> 3));
        o.p[0] = s(p0 + delta);
        o.q[0] = s(q0 - delta);
      end
      default: ;
    endcase
    return o;
  endfunction

  // Segment-level decisions, from lines 0 and 3.
  logic signed [31:0] b, t, dp0, dp3, dq0, dq3, d, side;
  logic de_p, de_q, use_strong;

  assign b    = int'(beta);
  assign t    = int'(tc);
  assign dp0  = d2(seg_in[0].p[2], seg_in[0].p[1], seg_in[0].p[0]);
  assign dq0  = d2(seg_in[0].q[2], seg_in[0].q[1], seg_in[0].q[0]);
  assign dp3  = d2(seg_in[3].p[2], seg_in[3].p[1], seg_in[3].p[0]);
  assign dq3  = d2(seg_in[3].q[2], seg_in[3].q[1], seg_in[3].q[0]);
  assign d    = dp0 + dq0 + dp3 + dq3;
  assign side = (b + (b >>> 1)) >>> 3;
  assign de_p = (dp0 + dp3) < side;
  assign de_q = (dq0 + dq3) < side;
  assign use_strong = strong_ok(seg_in[0], dp0 + dq0, b, t) &&
                      strong_ok(seg_in[3], dp3 + dq3, b, t);

  always_comb begin
    if (chroma)
      mode = (bs == 2'd2) ? DBF_CHROMA : DBF_SKIP;
    else if (bs == 2'd0 || d >= b)
      mode = DBF_SKIP;
    else
      mode = use_strong ? DBF_STRONG : DBF_NORMAL;
  end

  for (genvar l = 0; l < SEG_LINES; l++) begin : g_line
    assign seg_out[l] = filter_line(seg_in[l], mode, t, de_p, de_q);
  end

endmodule
