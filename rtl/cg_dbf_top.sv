// cg_dbf_top: a clock-gated deblocking filter actor between two queues.
//
// The deblocking filter actor runs on a gated clock gclk. Its input queue is
// written by the upstream producer on the free-running clk and read by the
// actor on gclk; its output queue is written by the actor on gclk and read by
// the downstream consumer on clk. A clock enabler watches the output queue's
// F and AF flags and stops gclk while the queue is (almost) full, so the
// actor does not toggle while it has nowhere to put its results; the actor's
// blocking write keeps the queue lossless in the cycles the gating cannot
// cover. The input queue's F/AF are brought out for the clock enabler
// of whatever actor feeds it.
//
// Interface: every port is synchronous to clk except gclk and out_stall,
// which belong to the gated clock and are brought out for observation.
// in_refused flags a producer write offered while in_full was high (it is
// not taken); out_stall flags an actor result held back by a full output
// queue. rst_n is asynchronous and active low. The producer
// writes tokens with in_wr while in_full is low; the consumer sees the oldest
// output token on out_data while out_empty is low and takes it with out_rd.
// From an input token to its filtered output: two clk cycles of input-queue
// synchroniser, one of the actor, two of output-queue synchroniser.
//
// Structure and gating scheme follow the paper; queue depths are this
// design's choice.
module cg_dbf_top
  import cg_pkg::*;
  import dbf_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 8,
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [3:0] beta_offset_div2,
  input  logic signed [3:0] tc_offset_div2,
  // producer side of the input queue
  input  logic              in_wr,
  input  dbf_token_t        in_data,
  output logic              in_full,
  output logic              in_afull,
  output logic              in_refused,
  // consumer side of the output queue
  input  logic              out_rd,
  output dbf_token_t        out_data,
  output logic              out_empty,
  // observation
  output logic              out_full,
  output logic              out_afull,
  output logic              out_stall,
  output logic              gclk,
  output logic              clk_en,
  output cg_state_t         cg_state,
  output dbf_mode_t         unit_mode [N_UNITS]
);

  logic       a_rd, a_wr, a_empty;
  dbf_token_t a_in, a_out;
  cg_state_t  st [1];

  async_queue #(.WIDTH($bits(dbf_token_t)), .DEPTH(IN_DEPTH)) u_in_q (
    .wclk        (clk),
    .wsync_clk   (clk),
    .wrst_n      (rst_n),
    .wr_en       (in_wr),
    .wdata       (in_data),
    .full        (in_full),
    .afull       (in_afull),
    .wr_refused (in_refused),
    .rclk        (gclk),
    .rrst_n      (rst_n),
    .rd_en       (a_rd),
    .rdata       (a_in),
    .empty       (a_empty)
  );

  deblocking_filter u_dbf (
    .clk              (gclk),
    .rst_n            (rst_n),
    .beta_offset_div2 (beta_offset_div2),
    .tc_offset_div2   (tc_offset_div2),
    .in_empty         (a_empty),
    .in_data          (a_in),
    .in_rd            (a_rd),
    .out_full         (out_full),
    .out_wr           (a_wr),
    .out_data         (a_out),
    .unit_mode        (unit_mode)
  );

  async_queue #(.WIDTH($bits(dbf_token_t)), .DEPTH(OUT_DEPTH)) u_out_q (
    .wclk        (gclk),
    .wsync_clk   (clk),
    .wrst_n      (rst_n),
    .wr_en       (a_wr),
    .wdata       (a_out),
    .full        (out_full),
    .afull       (out_afull),
    .wr_refused (out_stall),
    .rclk        (clk),
    .rrst_n      (rst_n),
    .rd_en       (out_rd),
    .rdata       (out_data),
    .empty       (out_empty)
  );

  clock_enabler #(.N_QUEUES(1), .N_PORTS(1), .PORT_OF(4'h0)) u_cge (
    .clk    (clk),
    .rst_n  (rst_n),
    .f      (out_full),
    .af     (out_afull),
    .gclk   (gclk),
    .clk_en (clk_en),
    .state  (st)
  );

  assign cg_state = st[0];

endmodule
