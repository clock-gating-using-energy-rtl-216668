// tb_filter_unit: random and directed segments through one filter unit,
// compared sample by sample and by chosen mode with the reference model.
// Fails if any of the four modes (skip, normal, strong, chroma) never occurs.
module tb_filter_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  dbf_seg_t          seg_in, seg_out;
  logic              chroma;
  logic [1:0]        bs;
  logic [BETA_W-1:0] beta;
  logic [TC_W-1:0]   tc;
  dbf_mode_t         mode;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  filter_unit dut (.seg_in(seg_in), .chroma(chroma), .bs(bs), .beta(beta), .tc(tc),
                   .seg_out(seg_out), .mode(mode));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(dbf_seg_t s, bit c, int b, int qp);
    seg_arr_t a;
    dbf_mode_t m;
    int bt, t;
    bt = ref_beta(qp, 0);
    t  = ref_tc(qp, b, 0);
    seg_in = s; chroma = c; bs = 2'(b);
    beta = BETA_W'(bt); tc = TC_W'(t);
    #1;
    a = to_arr(s);
    m = ref_segment(a, c, b, bt, t);
    checks++;
    if (mode != m || seg_out != from_arr(a)) begin
      failures++;
      if (failures < 10)
        $display("mismatch: chroma=%0d bs=%0d qp=%0d mode got %s want %s", c, b, qp,
                 mode.name(), m.name());
    end
    seen[int'(m)]++;
  endtask

  initial begin
    seg_arr_t a;
    // Directed: a flat area with a step of 6 at QP 40 takes the strong filter.
    for (int l = 0; l < 4; l++) for (int k = 0; k < 8; k++) a[l][k] = (k < 4) ? 100 : 106;
    run_one(from_arr(a), 1'b0, 2, 40);
    if (mode != DBF_STRONG) begin failures++; $display("directed strong case not strong"); end
    checks++;
    // Directed: same step with bS 0 is left alone.
    run_one(from_arr(a), 1'b0, 0, 40);
    if (seg_out != seg_in) begin failures++; $display("bS 0 changed samples"); end
    checks++;
    for (int i = 0; i < 20000; i++)
      run_one(rand_seg(), ($urandom_range(0, 4) == 0), int'($urandom_range(0, 2)),
              int'($urandom_range(10, 51)));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("mode %0d never occurred", k);
      end
    end
    $display("modes: skip=%0d normal=%0d strong=%0d chroma=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
