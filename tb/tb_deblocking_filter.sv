// tb_deblocking_filter: feeds the actor from a modelled first-word-fall-
// through queue with random gaps, and drives its output-full input with
// random stretches. A cycle model of the actor's one-stage pipeline says,
// for every clock, whether it must read, whether it must offer a word and
// which one: each token read comes out filtered, per the reference model,
// one clock later when the output has room, and is held unchanged while
// out_full is high. Threshold offsets change between batches. Fails if no
// stall happened or a filter mode never occurred.
module tb_deblocking_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic signed [3:0] boff = 0, toff = 0;
  logic in_empty, in_rd, out_wr, out_full = 0;
  int stalls = 0;
  dbf_token_t in_data, out_data;
  dbf_mode_t unit_mode [N_UNITS];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  dbf_token_t src [$];
  dbf_token_t exp_tok;
  modes_t     exp_mode;
  logic       exp_valid = 0;

  deblocking_filter dut (
    .clk(clk), .rst_n(rst_n), .beta_offset_div2(boff), .tc_offset_div2(toff),
    .in_empty(in_empty), .in_data(in_data), .in_rd(in_rd), .out_full(out_full),
    .out_wr(out_wr), .out_data(out_data), .unit_mode(unit_mode));

  always #5 clk = ~clk;

  int head = 0;  // next token to offer; advanced with the clock
  assign in_empty = (head >= src.size());
  assign in_data  = in_empty ? '0 : src[head];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic adv;
    // What the actor offers now.
    checks++;
    if (out_wr !== exp_valid) begin
      failures++;
      $display("t=%0t out_wr=%0d, expected %0d", $time, out_wr, exp_valid);
    end else if (exp_valid) begin
      checks++;
      if (out_data !== exp_tok) begin
        failures++;
        if (failures < 10) $display("t=%0t token mismatch", $time);
      end
      for (int u = 0; u < N_UNITS; u++) begin
        checks++;
        if (unit_mode[u] != exp_mode[u]) failures++;
      end
      if (!out_full) for (int u = 0; u < N_UNITS; u++) seen[int'(exp_mode[u])]++;
      else stalls++;
    end
    // Whether it reads the head token on this edge.
    adv = !exp_valid || !out_full;
    checks++;
    if (in_rd !== (adv && !in_empty)) begin
      failures++;
      $display("t=%0t in_rd=%0d, expected %0d", $time, in_rd, adv && !in_empty);
    end
    if (adv) begin
      exp_valid <= !in_empty;
      if (!in_empty) begin
        exp_tok <= ref_token(src[head], int'(boff), int'(toff), exp_mode);
        head    <= head + 1;
      end
    end
  end

  always @(negedge clk) out_full <= ($urandom_range(0, 4) == 0);

  initial begin
    #1 rst_n = 0;
    #12 rst_n = 1;
    for (int batch = 0; batch < 20; batch++) begin
      @(negedge clk);
      boff = 4'(int'($urandom_range(0, 6)) - 3);
      toff = 4'(int'($urandom_range(0, 6)) - 3);
      for (int i = 0; i < 100; i++) begin
        @(negedge clk);
        if ($urandom_range(0, 3) != 0) src.push_back(rand_token());
      end
      while (head < src.size()) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("mode %0d never occurred", k); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no output stall happened"); end
    $display("stalls=%0d", stalls);
    $display("modes: skip=%0d normal=%0d strong=%0d chroma=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
