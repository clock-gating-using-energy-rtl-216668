// detff: double edge triggered flip-flop.
//
// Captures d on both the rising and the falling edge of clk, so its output s
// follows d within half a clock period. It sits between the enable logic of
// the clock enabler and the clock buffer: an enable computed on the rising
// edge is passed on at the next falling edge, while the clock is low, so the
// buffer's enable never changes while the clock is high.
//
// The circuit is the XOR form of a DETFF: one flop per edge, each storing
// d XOR the other flop, and s = q_pos XOR q_neg. Only one flop changes at a
// time, so s has no glitch when both edges sample the same d. The paper
// calls for a DETFF here; the XOR structure is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), d, s. RESET_VAL sets s
// during and just after reset.
module detff #(
  parameter bit RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic s
);

  logic q_pos, q_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_pos <= RESET_VAL;
    else        q_pos <= d ^ q_neg;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_neg <= 1'b0;
    else        q_neg <= d ^ q_pos;
  end

  assign s = q_pos ^ q_neg;

endmodule
