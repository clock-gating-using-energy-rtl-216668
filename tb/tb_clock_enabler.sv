// tb_clock_enabler: the three published enabler configurations side by side,
//   (a) one port with a fanout of two queues       -> AND of two controllers
//   (b) two separate ports                         -> OR of two controllers
//   (c) a fanout of two plus another port          -> (c0 AND c1) OR c2
// each driven with its own random F/AF sequence. A model of the controller
// states and of the gating rule predicts, for every rising edge, whether the
// gated clock pulses (the enable computed at one rising edge takes effect at
// the next one). Also counts edges with the gated clock stopped and running
// for each configuration, and fails if either never happened.
module tb_clock_enabler;
  import cg_pkg::*;

  logic clk = 0, rst_n = 1;
  logic [1:0] fa, afa, fb, afb;
  logic [2:0] fc, afc;
  logic ga, gb, gc, ea, eb, ec;
  cg_state_t sa [2], sb [2], sc [3];
  int checks = 0, failures = 0;
  int stopped [3] = '{0, 0, 0};
  int running [3] = '{0, 0, 0};

  clock_enabler #(.N_QUEUES(2), .N_PORTS(1), .PORT_OF(8'h00)) dut_a (
    .clk(clk), .rst_n(rst_n), .f(fa), .af(afa), .gclk(ga), .clk_en(ea), .state(sa));
  clock_enabler #(.N_QUEUES(2), .N_PORTS(2), .PORT_OF(8'h10)) dut_b (
    .clk(clk), .rst_n(rst_n), .f(fb), .af(afb), .gclk(gb), .clk_en(eb), .state(sb));
  clock_enabler #(.N_QUEUES(3), .N_PORTS(2), .PORT_OF(12'h100)) dut_c (
    .clk(clk), .rst_n(rst_n), .f(fc), .af(afc), .gclk(gc), .clk_en(ec), .state(sc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Controller model: next state and enable.
  function automatic cg_state_t nxt(cg_state_t s, logic f, logic af);
    case (s)
      CG_INIT:          return (!f && !af) ? CG_SPACE : CG_INIT;
      CG_SPACE:         return af ? CG_AFULL_DISABLE : CG_SPACE;
      CG_AFULL_DISABLE: return !af ? CG_SPACE : (f ? CG_FULL : CG_AFULL_DISABLE);
      CG_FULL:          return !f ? CG_AFULL_ENABLE : CG_FULL;
      default:          return (!f && !af) ? CG_SPACE : (f ? CG_FULL : CG_AFULL_ENABLE);
    endcase
  endfunction
  function automatic logic on(cg_state_t s);
    return s == CG_INIT || s == CG_SPACE || s == CG_AFULL_ENABLE;
  endfunction

  cg_state_t ma [2], mb [2], mc [3];

  // Random flags one queue could show: empty-ish, almost full, full.
  task automatic pick(output logic f, output logic af);
    int r = int'($urandom_range(0, 5));
    f  = (r == 5);
    af = (r >= 3);
  endtask

  task automatic expect_eq(logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("t=%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  initial begin
    logic wa, wb, wc;
    for (int i = 0; i < 2; i++) begin ma[i] = CG_INIT; mb[i] = CG_INIT; end
    for (int i = 0; i < 3; i++) mc[i] = CG_INIT;
    fa = '1; afa = '1; fb = '1; afb = '1; fc = '1; afc = '1;
    #1 rst_n = 0;
    #4 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // Low phase: new flags.
      #5;
      for (int i = 0; i < 2; i++) begin pick(fa[i], afa[i]); pick(fb[i], afb[i]); end
      for (int i = 0; i < 3; i++) pick(fc[i], afc[i]);
      // Rising edge: the gated clocks pulse per the enables of the states
      // entered at the previous rising edge.
      wa = on(ma[0]) & on(ma[1]);
      wb = on(mb[0]) | on(mb[1]);
      wc = (on(mc[0]) & on(mc[1])) | on(mc[2]);
      clk = 1;
      #1;
      expect_eq(ga, wa, "config a gated clock");
      expect_eq(gb, wb, "config b gated clock");
      expect_eq(gc, wc, "config c gated clock");
      if (wa) running[0]++; else stopped[0]++;
      if (wb) running[1]++; else stopped[1]++;
      if (wc) running[2]++; else stopped[2]++;
      for (int i = 0; i < 2; i++) begin
        ma[i] = nxt(ma[i], fa[i], afa[i]);
        mb[i] = nxt(mb[i], fb[i], afb[i]);
        checks += 2;
        if (sa[i] != ma[i] || sb[i] != mb[i]) failures++;
      end
      for (int i = 0; i < 3; i++) begin
        mc[i] = nxt(mc[i], fc[i], afc[i]);
        checks++;
        if (sc[i] != mc[i]) failures++;
      end
      #4 clk = 0;
      #1;
      expect_eq(ga, 1'b0, "config a low phase");
      expect_eq(ea, on(ma[0]) & on(ma[1]), "config a DETFF output after falling edge");
    end
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (stopped[k] == 0 || running[k] == 0) begin
        failures++;
        $display("config %0d: gated clock stopped %0d running %0d", k, stopped[k], running[k]);
      end
    end
    $display("gated-clock edges stopped/running: a %0d/%0d b %0d/%0d c %0d/%0d",
             stopped[0], running[0], stopped[1], running[1], stopped[2], running[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
