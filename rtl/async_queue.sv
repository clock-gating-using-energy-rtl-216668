// async_queue: order-preserving, lossless dual-clock FIFO with full (F) and
// almost-full (AF) flags, used between dataflow actors.
//
// The queue has a producing (write) clock and a consuming (read) clock. Read
// and write pointers are kept in binary and Gray code; each side sees the
// other's Gray pointer through a SYNC_STAGES-deep synchronizer, so every flag
// is conservative: a side may see the queue fuller (write side) or emptier
// (read side) than it is, never the reverse.
//
//   F  (full)        : no free slot, as seen from the write side
//   AF (almost full) : at most one free slot, so AF stays high while F is high
//
// F and AF are combinational in the write pointer, so they rise in the same
// cycle as the write that causes them; a clock enabler reacting one cycle
// later still finds one slot free for a write already under way.
//
// When the write clock is a gated clock, the read pointer must still reach
// the write side while that clock is stopped, or F could never fall again.
// The synchronizer that carries the read pointer to the write side therefore
// has its own clock, wsync_clk: tie it to wclk for two free-running clocks,
// or to the free-running source of a gated wclk (the two then share edges).
//
// The read side is first-word-fall-through: rdata shows the oldest word
// whenever empty is low, and rd_en removes it. A write offered while F is
// high is not taken and is flagged on wr_refused in the next write-clock
// cycle (a writer that holds its word then loses nothing); a read while
// empty is ignored. Depth, width and synchronizer length are not given by
// the paper and are this design's choice.
module async_queue #(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  // write (producing) side
  input  logic             wclk,
  input  logic             wsync_clk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             afull,
  output logic             wr_refused,
  // read (consuming) side
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $error("async_queue: DEPTH must be a power of two of at least 2");
  end

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  logic [PW-1:0] wbin, wgray, rbin, rgray;
  logic [PW-1:0] rgray_sync [SYNC_STAGES];
  logic [PW-1:0] wgray_sync [SYNC_STAGES];
  logic [PW-1:0] wcount, rcount_avail;
  logic          do_write, do_read;

  // ---------------- write side ----------------
  assign wcount = wbin - gray2bin(rgray_sync[SYNC_STAGES-1]);
  assign full   = (wcount == PW'(DEPTH));
  assign afull  = (wcount >= PW'(DEPTH - 1));
  assign do_write = wr_en && !full;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin        <= '0;
      wgray       <= '0;
      wr_refused <= 1'b0;
    end else begin
      wr_refused <= wr_en && full;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wsync_clk or negedge wrst_n) begin
    if (!wrst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) rgray_sync[i] <= '0;
    end else begin
      rgray_sync[0] <= rgray;
      for (int i = 1; i < SYNC_STAGES; i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  // F implies AF; the write side never counts more words than slots.
  a_flags: assert property (@(posedge wclk) disable iff (!wrst_n)
    (full -> afull) && (wcount <= PW'(DEPTH)));

  // ---------------- read side ----------------
  assign rcount_avail = gray2bin(wgray_sync[SYNC_STAGES-1]) - rbin;
  assign empty   = (rcount_avail == '0);
  assign do_read = rd_en && !empty;
  assign rdata   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) wgray_sync[i] <= '0;
    end else begin
      wgray_sync[0] <= wgray;
      for (int i = 1; i < SYNC_STAGES; i++) wgray_sync[i] <= wgray_sync[i-1];
      if (do_read) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
