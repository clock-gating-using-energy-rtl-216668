// deblocking_filter: the clock-gated dataflow actor.
//
// Each cycle of its (gated) clock the actor takes the token at the head of
// its input queue, if there is one, filters its four segments in parallel
// and, one cycle later, writes the filtered token to its output queue. Two
// filter units serve the segments of the block's left edge (horizontal
// filtering) and two those of its top edge (vertical filtering); one
// threshold derivation block turns the token's QP and the per-segment
// boundary strengths into beta and tc.
//
// Reads and writes are blocking, as for any actor of the dataflow network:
// with an empty input queue the actor produces nothing, and while its output
// queue is full (out_full) it holds its result and reads no further token.
// The clock enabler normally stops the actor's clock before that happens;
// the write stall is what keeps the queue lossless in the one case the
// gating cannot cover, the cycle after the controller re-enables the clock
// with a single slot free.
//
// Interface: clk is the gated clock; in_empty/in_data/in_rd face the
// first-word-fall-through read side of the input queue; out_wr/out_data/
// out_full face the write side of the output queue (a word is taken on a
// clock edge where out_wr is high and out_full low); unit_mode tells what
// each filter unit did to the token now in out_data. beta_offset_div2/tc_offset_div2 are
// per-picture threshold offsets (HEVC slice offsets; this design's choice).
// Latency: one clock from read to write; throughput: one token per clock
// while the output queue has room.
//
// The block structure (threshold derivation, four filter units with luma and
// chroma filters) follows the paper. The token layout that stands in for
// its block memories, splitters, combiners, block buffer and transposer,
// whose organisation the paper does not give, is this design's own.
module deblocking_filter
  import dbf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [3:0]   beta_offset_div2,
  input  logic signed [3:0]   tc_offset_div2,
  // input queue, read side
  input  logic                in_empty,
  input  dbf_token_t          in_data,
  output logic                in_rd,
  // output queue, write side
  input  logic                out_full,
  output logic                out_wr,
  output dbf_token_t          out_data,
  output dbf_mode_t           unit_mode [N_UNITS]
);

  logic [BETA_W-1:0]             beta;
  logic [N_UNITS-1:0][TC_W-1:0]  tc;
  dbf_seg_t [N_UNITS-1:0]        seg_f;
  dbf_mode_t                     mode_f [N_UNITS];

  threshold_derivation #(.N_EDGES(N_UNITS)) u_thr (
    .qp               (in_data.qp),
    .bs               (in_data.bs),
    .beta_offset_div2 (beta_offset_div2),
    .tc_offset_div2   (tc_offset_div2),
    .beta             (beta),
    .tc               (tc)
  );

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    filter_unit u_fu (
      .seg_in  (in_data.seg[u]),
      .chroma  (in_data.chroma),
      .bs      (in_data.bs[u]),
      .beta    (beta),
      .tc      (tc[u]),
      .seg_out (seg_f[u]),
      .mode    (mode_f[u])
    );
  end

  // The output register may take a new result when it is empty or its
  // word leaves for the queue on this edge.
  logic advance;
  assign advance = !out_wr || !out_full;
  assign in_rd   = !in_empty && advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_wr <= 1'b0;
      for (int u = 0; u < N_UNITS; u++) unit_mode[u] <= DBF_SKIP;
    end else if (advance) begin
      out_wr <= !in_empty;
      if (!in_empty)
        for (int u = 0; u < N_UNITS; u++) unit_mode[u] <= mode_f[u];
    end
  end

  always_ff @(posedge clk) begin
    if (in_rd) begin
      out_data        <= in_data;
      out_data.seg    <= seg_f;
    end
  end

  // Write handshake: a word refused by a full queue stays offered, unchanged.
  a_hold_on_full: assert property (@(posedge clk) disable iff (!rst_n)
    out_wr && out_full |=> out_wr && $stable(out_data));

endmodule
