// dbf_pkg: sample, segment and token types of the deblocking filter.
//
// A segment is four lines across one block edge. Each line holds the four
// samples on either side of the edge, p[0]/q[0] being the two next to it.
// A token, the unit of work the filter actor reads from its input queue and
// writes to its output queue, carries four segments: segments 0 and 1 cross
// the left (vertical) edge of an 8x8 block and go to the two horizontal
// filters, segments 2 and 3 cross its top (horizontal) edge and go to the two
// vertical filters. Each segment has its own boundary strength; the block has
// one quantisation parameter.
//
// The 8-bit sample depth, the token layout and the segment size are this
// design's choice; the filter equations follow the HEVC deblocking filter,
// which the paper's beta/tc thresholds point to.
package dbf_pkg;

  localparam int unsigned BITDEPTH  = 8;
  localparam int unsigned N_UNITS   = 4;  // two horizontal and two vertical filters
  localparam int unsigned SEG_LINES = 4;

  typedef logic [BITDEPTH-1:0] sample_t;

  typedef struct packed {
    sample_t [3:0] q;  // q[0] next to the edge
    sample_t [3:0] p;  // p[0] next to the edge
  } dbf_line_t;

  typedef dbf_line_t [SEG_LINES-1:0] dbf_seg_t;

  typedef struct packed {
    logic                     chroma;  // 1: chroma block
    logic [5:0]               qp;      // quantisation parameter of the edge (0..51)
    logic [N_UNITS-1:0][1:0]  bs;      // boundary strength per segment (0..2)
    dbf_seg_t [N_UNITS-1:0]   seg;
  } dbf_token_t;


  // What a filter unit did to its segment.
  typedef enum logic [1:0] {
    DBF_SKIP   = 2'd0,
    DBF_NORMAL = 2'd1,
    DBF_STRONG = 2'd2,
    DBF_CHROMA = 2'd3
  } dbf_mode_t;

  // Widths of the thresholds at this sample depth.
  localparam int unsigned BETA_W = 7 + BITDEPTH - 8;  // beta <= 64 << (BITDEPTH-8)
  localparam int unsigned TC_W   = 5 + BITDEPTH - 8;  // tc   <= 24 << (BITDEPTH-8)

endpackage
