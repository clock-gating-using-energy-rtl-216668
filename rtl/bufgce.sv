// bufgce: behavioural model of an FPGA global clock buffer with clock enable.
//
// This is a model of a vendor primitive, not logic meant to be synthesised
// in its place. It passes the clock I to O while the enable CE is high and
// holds O low while CE is low. CE is sampled only while I is low (a
// transparent-low latch), so a change of CE while I is high cannot cut a
// clock pulse short: O only ever starts or stops at a whole pulse.
//
// The latch below is intended; it is what makes the gated clock glitch-free.
//
// Ports follow the primitive: I (clock in), CE (enable), O (gated clock).
module bufgce (
  input  logic I,
  input  logic CE,
  output logic O
);

  logic ce_q;

  always_latch begin
    if (!I) ce_q = CE;
  end

  assign O = I & ce_q;

endmodule
