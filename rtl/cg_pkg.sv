// cg_pkg: shared types of the clock-gating circuit.
//
// The clock enabling controller is a five-state machine. Its states are the
// ones named for it (INIT, SPACE, AFULL_DISABLE, FULL, AFULL_ENABLE); the
// binary encoding below is this design's own choice.
package cg_pkg;

  typedef enum logic [2:0] {
    CG_INIT          = 3'd0,  // after reset, enable held high
    CG_SPACE         = 3'd1,  // queue has room, enable high
    CG_AFULL_DISABLE = 3'd2,  // one slot left, enable dropped
    CG_FULL          = 3'd3,  // queue full, enable low
    CG_AFULL_ENABLE  = 3'd4   // a slot freed after full, enable high again
  } cg_state_t;

  // Enable output associated with each state (Moore output).
  function automatic logic cg_state_en(cg_state_t s);
    return !(s == CG_AFULL_DISABLE || s == CG_FULL);
  endfunction

endpackage
