// clock_enabler: the clock enabler circuit of one clock-gated actor.
//
// One cg_controller watches the F/AF flags of each output queue of the
// actor. The controllers' enables are combined according to how the actor's
// outputs are wired:
//   * queues fed through a fanout from the same output port are ANDed, so the
//     actor stops when any queue of the fanout is about to overflow;
//   * the results of different output ports are ORed, so the actor keeps
//     running while some port still has room (a consumer further on may need
//     more tokens before it can free space anywhere).
// The result goes through a double edge triggered flip-flop into a clock
// buffer with enable, whose output is the actor's gated clock. The same
// gated clock is meant for the actor, the read side of its input queues and
// the write side of its output queues.
//
// PORT_OF holds four bits per queue: PORT_OF[4*i +: 4] is the output port
// that queue i hangs off. The published configurations map to:
//   (a) one port with a fanout of two:   N_QUEUES=2, N_PORTS=1, PORT_OF='h00
//   (b) two separate ports:              N_QUEUES=2, N_PORTS=2, PORT_OF='h10
//   (c) fanout of two plus another port: N_QUEUES=3, N_PORTS=2, PORT_OF='h100
// The defaults are the single-queue case used by the deblocking filter.
//
// Timing: en_comb follows the controllers' registered enables; the DETFF
// hands it to the buffer on the next falling edge of clk, so gclk stops
// or restarts from the second rising edge after the flags changed.
module clock_enabler
  import cg_pkg::*;
#(
  parameter int unsigned             N_QUEUES = 1,
  parameter int unsigned             N_PORTS  = 1,
  parameter logic [4*N_QUEUES-1:0]   PORT_OF  = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_QUEUES-1:0] f,
  input  logic [N_QUEUES-1:0] af,
  output logic                gclk,
  output logic                clk_en,
  output cg_state_t           state [N_QUEUES]
);

  logic [N_QUEUES-1:0] q_en;
  logic [N_PORTS-1:0]  port_en;
  logic                en_comb;

  for (genvar i = 0; i < N_QUEUES; i++) begin : g_ctrl
    cg_controller u_ctrl (
      .clk   (clk),
      .rst_n (rst_n),
      .f     (f[i]),
      .af    (af[i]),
      .en    (q_en[i]),
      .state (state[i])
    );
  end

  // AND over the queues of one port's fanout, OR across ports.
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      port_en[p] = 1'b1;
      for (int i = 0; i < N_QUEUES; i++)
        if (int'(PORT_OF[4*i +: 4]) == p) port_en[p] = port_en[p] & q_en[i];
    end
    en_comb = |port_en;
  end

  detff #(.RESET_VAL(1'b1)) u_detff (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (en_comb),
    .s     (clk_en)
  );

  bufgce u_bufgce (
    .I  (clk),
    .CE (clk_en),
    .O  (gclk)
  );

endmodule
