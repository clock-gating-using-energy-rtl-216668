// cg_controller: clock enabling controller for one output queue.
//
// A Moore state machine that watches the full (F) and almost-full (AF) flags
// of one queue written by the gated actor and decides whether the actor's
// clock may run (en = 1) or must stop (en = 0). AF is taken to be high when at
// most one free slot is left, so it stays high while the queue is full.
//
//   INIT          en=1  F=0,AF=0 -> SPACE
//   SPACE         en=1  AF=1     -> AFULL_DISABLE
//   AFULL_DISABLE en=0  AF=0 -> SPACE ; F=1,AF=1 -> FULL
//   FULL          en=0  F=0      -> AFULL_ENABLE
//   AFULL_ENABLE  en=1  F=0,AF=0 -> SPACE ; F=1,AF=1 -> FULL
//
// The states, their enable values and the printed transitions follow the
// controller's published state diagram and step list. Input combinations the
// diagram does not label are this design's choice: SPACE leaves on AF=1
// whatever F is, FULL leaves on F=0 whatever AF is, and any other
// unlisted combination holds the state. F=1 with AF=0 cannot come from a
// queue and holds the state.
//
// Interface: clk (free-running clock), rst_n (asynchronous, active low),
// f / af from the queue, en registered output. en changes one clock after the
// flags that cause it; the clock enabler absorbs that latency with the
// queue's last free slot.
module cg_controller
  import cg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      f,
  input  logic      af,
  output logic      en,
  output cg_state_t state
);

  cg_state_t state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      CG_INIT:          if (!f && !af) state_n = CG_SPACE;
      CG_SPACE:         if (af)        state_n = CG_AFULL_DISABLE;
      CG_AFULL_DISABLE: if (!af)       state_n = CG_SPACE;
                        else if (f)    state_n = CG_FULL;
      CG_FULL:          if (!f)        state_n = CG_AFULL_ENABLE;
      CG_AFULL_ENABLE:  if (!f && !af) state_n = CG_SPACE;
                        else if (f)    state_n = CG_FULL;
      default:                         state_n = CG_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CG_INIT;
    else        state <= state_n;
  end

  assign en = cg_state_en(state);

endmodule
