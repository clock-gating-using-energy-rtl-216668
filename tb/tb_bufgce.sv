// tb_bufgce: checks the clock buffer model: O copies I while CE is high, is
// low while CE is low, and a change of CE while I is high changes nothing
// until I has gone low.
module tb_bufgce;
  logic I = 0, CE = 1, O;
  int checks = 0, failures = 0;

  bufgce dut (.I(I), .CE(CE), .O(O));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic want, string what);
    #1;
    checks++;
    if (O !== want) begin
      failures++;
      $display("t=%0t %s: O=%0d want %0d", $time, what, O, want);
    end
  endtask

  initial begin
    logic ce_low;  // CE as sampled during the last low phase
    for (int i = 0; i < 500; i++) begin
      // Low phase: CE may change and is taken.
      I = 0;
      CE = 1'($urandom_range(0, 1));
      ce_low = CE;
      check(1'b0, "low phase");
      // High phase: O follows the CE taken while low.
      I = 1;
      check(ce_low, "rising edge");
      // CE toggles while I is high: no effect.
      CE = ~CE;
      check(ce_low, "CE change while high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
