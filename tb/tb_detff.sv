// tb_detff: checks that the double edge triggered flip-flop takes d on the
// rising and on the falling edge, and holds it in between.
module tb_detff;
  logic clk = 0, rst_n = 1, d = 0, s;
  int checks = 0, failures = 0;
  int pos_updates = 0, neg_updates = 0;

  detff #(.RESET_VAL(1'b1)) dut (.clk(clk), .rst_n(rst_n), .d(d), .s(s));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic want, string what);
    checks++;
    if (s !== want) begin
      failures++;
      $display("t=%0t %s: s=%0d want %0d", $time, what, s, want);
    end
  endtask

  initial begin
    logic sampled;
    #1 rst_n = 0;
    #2;
    check(1'b1, "reset value");
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // d settles mid-phase, then the clock toggles.
      d = 1'($urandom_range(0, 1));
      #2;
      sampled = d;
      clk = ~clk;
      #1;
      check(sampled, clk ? "after rising edge" : "after falling edge");
      if (clk) pos_updates++; else neg_updates++;
      // A change of d between edges must not reach s.
      d = ~d;
      #1;
      check(sampled, "between edges");
    end
    checks++;
    if (pos_updates == 0 || neg_updates == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
