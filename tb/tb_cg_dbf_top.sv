// tb_cg_dbf_top: end-to-end test of the clock-gated deblocking filter at its
// default sizes.
//
// A producer writes random tokens into the input queue whenever it is not
// full; a consumer reads the output queue with a pattern that changes by
// phase: always (free flow), not at all (the output queue fills and the
// actor's clock stops), slowly (the queue hovers at almost-full), and at
// random. Every token that comes out must be the reference-filtered copy of
// the next token that went in. The test counts how often each mechanism
// happened and fails if one never did: gated-clock edges, each controller
// state, producer back-pressure from a full input queue, and each filter
// mode, and the actor holding a result for a full output queue (which
// happens when the controller re-enables the clock with one slot free and
// the actor has two results to give). A refused write into the input queue,
// or any stopped clock edge during the free-flow phase, is a failure.
// Two timing rules are checked as well: on every clock, the gated clock
// pulses exactly when the controller's enable was high one clock earlier;
// and in free flow the filter delivers tokens as fast as the producer offers
// them (at least 14 per 16 cycles against 15 offered), so gating costs no
// throughput.
module tb_cg_dbf_top;
  import cg_pkg::*;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic signed [3:0] boff = 0, toff = 0;
  logic in_wr = 0, in_full, in_afull, in_refused;
  dbf_token_t in_data = '0, out_data;
  logic out_rd = 0, out_empty, out_full, out_afull, out_stall, gclk, clk_en;
  cg_state_t cg_state;
  dbf_mode_t unit_mode [N_UNITS];

  cg_dbf_top dut (
    .clk(clk), .rst_n(rst_n), .beta_offset_div2(boff), .tc_offset_div2(toff),
    .in_wr(in_wr), .in_data(in_data), .in_full(in_full), .in_afull(in_afull),
    .in_refused(in_refused),
    .out_rd(out_rd), .out_data(out_data), .out_empty(out_empty),
    .out_full(out_full), .out_afull(out_afull), .out_stall(out_stall),
    .gclk(gclk), .clk_en(clk_en), .cg_state(cg_state), .unit_mode(unit_mode));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  dbf_token_t expq [$];
  int sent = 0, received = 0;
  int phase_cycle = 0;         // cycles since the phase began
  int phase = 0;               // 0 free flow, 1 stalled, 2 slow, 3 random, 4 drain
  int gated_edges = 0, gated_in_free_flow = 0, in_backpressure = 0;
  int state_seen [5] = '{0, 0, 0, 0, 0};
  int mode_seen [4] = '{0, 0, 0, 0};
  int gclk_edges = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog: sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall_edges = 0;
  logic pulsed = 0;            // gclk rose since the last clk edge
  always @(posedge gclk) begin
    gclk_edges++;
    pulsed = 1'b1;
    if (out_stall) stall_edges++;
  end

  // Enable latency: gclk pulses on a clk edge exactly when the controller's
  // enable was high after the previous clk edge (one clock from the state
  // change to the gated clock).
  logic prev_en = 1'b1;
  int latency_checks = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      latency_checks++;
      if (pulsed !== prev_en) begin
        failures++;
        $display("t=%0t gclk pulse %0d but enable one clock earlier was %0d", $time, pulsed, prev_en);
      end
    end
    pulsed  = 1'b0;
    prev_en = cg_state_en(cg_state);
  end

  // Throughput: tokens delivered in the settled part of each free-flow phase.
  int ff_received = 0, ff_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    // Producer side.
    if (in_wr && !in_full) begin
      modes_t m;
      expq.push_back(ref_token(in_data, int'(boff), int'(toff), m));
      for (int u = 0; u < N_UNITS; u++) mode_seen[int'(m[u])]++;
      sent++;
    end
    // Consumer side.
    if (phase == 0 && phase_cycle > 20) ff_cycles++;
    if (out_rd && !out_empty) begin
      checks++;
      received++;
      if (phase == 0 && phase_cycle > 20) ff_received++;
      if (expq.size() == 0) begin
        failures++;
        $display("t=%0t token out with none expected", $time);
      end else begin
        if (out_data !== expq[0]) begin
          failures++;
          if (failures < 10) $display("t=%0t token %0d differs from reference", $time, received);
        end
        void'(expq.pop_front());
      end
    end
    // Gating and safety.
    if (!clk_en) begin
      gated_edges++;
      if (phase == 0 && phase_cycle > 20) gated_in_free_flow++;
    end
    state_seen[int'(cg_state)]++;
    checks++;
    if (in_refused) begin
      failures++;
      $display("t=%0t input queue refused a write", $time);
    end
  end

  // Producer: writes whenever the input queue has room, with rare gaps.
  always @(negedge clk) begin
    if (rst_n && phase < 4 && $urandom_range(0, 15) != 0) begin
      if (in_full) in_backpressure++;
      in_wr   <= !in_full;
      in_data <= rand_token();
    end else
      in_wr <= 1'b0;
  end

  task automatic run_phase(int p, int cycles);
    phase = p;
    phase_cycle = 0;
    repeat (cycles) begin
      @(negedge clk);
      phase_cycle++;
      case (p)
        0: out_rd = 1'b1;
        1: out_rd = 1'b0;
        2: out_rd = ($urandom_range(0, 3) == 0);
        3: out_rd = ($urandom_range(0, 1) == 0);
        default: out_rd = 1'b1;
      endcase
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #22 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      // The offsets are picture-level settings: change them only with the
      // pipeline empty.
      run_phase(4, 60);
      boff = 4'(int'($urandom_range(0, 4)) - 2);
      toff = 4'(int'($urandom_range(0, 4)) - 2);
      run_phase(0, 200);
      run_phase(1, 60);
      run_phase(2, 200);
      run_phase(3, 200);
    end
    run_phase(4, 100);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d tokens never came out", expq.size());
    end
    // Every mechanism must have happened.
    checks++;
    if (gated_edges == 0) begin failures++; $display("clock never gated"); end
    checks++;
    if (gated_in_free_flow != 0) begin
      failures++;
      $display("clock gated %0d times with a consumer reading every cycle", gated_in_free_flow);
    end
    // The producer offers a token on 15 of 16 cycles; with a consumer that
    // reads every cycle the actor must keep up with it.
    checks++;
    if (ff_received * 16 < ff_cycles * 14) begin
      failures++;
      $display("free-flow throughput %0d tokens in %0d cycles", ff_received, ff_cycles);
    end
    checks++;
    if (stall_edges == 0) begin failures++; $display("actor never stalled on a full output queue"); end
    checks++;
    if (in_backpressure == 0) begin failures++; $display("input queue never pushed back"); end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (state_seen[s] == 0) begin failures++; $display("controller state %0d never seen", s); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (mode_seen[k] == 0) begin failures++; $display("filter mode %0d never used", k); end
    end
    $display("tokens sent=%0d received=%0d; gated edges=%0d of %0d gclk edges=%0d; input back-pressure=%0d; actor stalls=%0d",
             sent, received, gated_edges, state_seen[0] + state_seen[1] + state_seen[2] +
             state_seen[3] + state_seen[4], gclk_edges, in_backpressure, stall_edges);
    $display("free flow: %0d tokens in %0d cycles; enable-latency checks %0d",
             ff_received, ff_cycles, latency_checks);
    $display("controller cycles: INIT=%0d SPACE=%0d AFULL_DISABLE=%0d FULL=%0d AFULL_ENABLE=%0d",
             state_seen[0], state_seen[1], state_seen[2], state_seen[3], state_seen[4]);
    $display("filter modes: skip=%0d normal=%0d strong=%0d chroma=%0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
