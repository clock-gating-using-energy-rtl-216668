// tb_cg_controller: drives the controller with directed and random F/AF
// sequences and compares state and enable each cycle with a transition table
// taken from the controller's state diagram. Fails if a state is never
// visited.
module tb_cg_controller;
  import cg_pkg::*;

  logic clk = 0, rst_n = 0, f = 0, af = 0, en;
  cg_state_t state, model;
  int checks = 0, failures = 0;
  int visits [5] = '{0, 0, 0, 0, 0};

  cg_controller dut (.clk(clk), .rst_n(rst_n), .f(f), .af(af), .en(en), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transition table of the state diagram: row = state, column = {F, AF}.
  cg_state_t NEXT [5][4] = '{
    //            00                01                10                11
    /* INIT */  '{CG_SPACE,         CG_INIT,          CG_INIT,          CG_INIT},
    /* SPACE */ '{CG_SPACE,         CG_AFULL_DISABLE, CG_SPACE,         CG_AFULL_DISABLE},
    /* AFD   */ '{CG_SPACE,         CG_AFULL_DISABLE, CG_AFULL_DISABLE, CG_FULL},
    /* FULL  */ '{CG_AFULL_ENABLE,  CG_AFULL_ENABLE,  CG_FULL,          CG_FULL},
    /* AFE   */ '{CG_SPACE,         CG_AFULL_ENABLE,  CG_AFULL_ENABLE,  CG_FULL}};
  logic EN_OF [5] = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b1};

  task automatic step(logic nf, logic naf);
    f = nf; af = naf;
    @(posedge clk);
    model = NEXT[int'(model)][{nf, naf}];
    #1;
    checks++;
    if (state != model || en != EN_OF[int'(model)]) begin
      failures++;
      $display("t=%0t F=%0d AF=%0d: state %s en %0d, expected %s en %0d", $time, nf, naf,
               state.name(), en, model.name(), EN_OF[int'(model)]);
    end
    visits[int'(state)]++;
  endtask

  initial begin
    model = CG_INIT;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (state != CG_INIT || en != 1'b1) begin failures++; $display("reset state wrong"); end
    rst_n = 1;
    // INIT holds while flags are high, then the full walk of the diagram.
    step(1, 1); step(0, 1); step(0, 0);          // INIT, INIT, SPACE
    step(0, 1); step(0, 1); step(1, 1);          // AFD, AFD, FULL
    step(1, 1); step(0, 1); step(0, 1);          // FULL, AFE, AFE
    step(1, 1); step(0, 1); step(0, 0);          // FULL, AFE, SPACE
    step(0, 1); step(0, 0);                      // AFD, SPACE
    // Random flag sequences, mostly the combinations a queue can produce.
    for (int i = 0; i < 5000; i++) begin
      int r = int'($urandom_range(0, 9));
      if (r < 4)      step(0, 0);
      else if (r < 7) step(0, 1);
      else if (r < 9) step(1, 1);
      else            step(1, 0);
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
