// threshold_derivation: derives the edge thresholds beta and tc from the
// quantisation parameter.
//
// beta limits how much activity next to an edge still counts as a blocking
// artifact; tc limits how far a sample may be moved. Both grow with QP.
// One beta serves the block; tc is derived per segment, since it also grows
// with the segment's boundary strength bS:
//   Qb = clip(0, 51, qp + 2*beta_offset_div2)
//   Qt = clip(0, 53, qp + 2*(bS-1) + 2*tc_offset_div2)
//   beta' = 0 (Qb<16), Qb-10 (Qb<=28), 2*Qb-38 (Qb>=29)
//   tc'   = the HEVC tc table, indexed by Qt
//   beta = beta' << (BITDEPTH-8), tc = tc' << (BITDEPTH-8)
// The paper names this block and its outputs beta and tc; the equations
// and the tc table are those of the HEVC standard, this design's choice.
// Purely combinational.
module threshold_derivation
  import dbf_pkg::*;
#(
  parameter int unsigned N_EDGES = N_UNITS
) (
  input  logic [5:0]                     qp,
  input  logic [N_EDGES-1:0][1:0]        bs,
  input  logic signed [3:0]              beta_offset_div2,
  input  logic signed [3:0]              tc_offset_div2,
  output logic [BETA_W-1:0]              beta,
  output logic [N_EDGES-1:0][TC_W-1:0]   tc
);

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int beta_prime(int q);
    if (q < 16)       return 0;
    else if (q <= 28) return q - 10;
    else              return 2 * q - 38;
  endfunction

  function automatic int tc_prime(int q);
    if (q < 18)       return 0;
    else if (q <= 26) return 1;
    else if (q <= 30) return 2;
    else if (q <= 34) return 3;
    else if (q <= 37) return 4;
    else if (q <= 39) return 5;
    else if (q <= 41) return 6;
    else if (q <= 43) return q - 35;  // 7, 8
    else case (q)
      44: return 9;
      45: return 10;
      46: return 11;
      47: return 13;
      48: return 14;
      49: return 16;
      50: return 18;
      51: return 20;
      52: return 22;
      default: return 24;
    endcase
  endfunction

  assign beta = BETA_W'(beta_prime(clip3(0, 51, int'(qp) + 2 * int'(beta_offset_div2)))
                        << (BITDEPTH - 8));

  for (genvar e = 0; e < N_EDGES; e++) begin : g_tc
    assign tc[e] = TC_W'(tc_prime(clip3(0, 53, int'(qp) + 2 * (int'(bs[e]) - 1)
                                                + 2 * int'(tc_offset_div2)))
                         << (BITDEPTH - 8));
  end

endmodule
