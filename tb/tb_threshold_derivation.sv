// tb_threshold_derivation: checks beta and tc for every QP, boundary
// strength and a spread of offsets against the literal HEVC tables held in
// the reference package.
module tb_threshold_derivation;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic [5:0]                    qp;
  logic [N_UNITS-1:0][1:0]       bs;
  logic signed [3:0]             boff, toff;
  logic [BETA_W-1:0]             beta;
  logic [N_UNITS-1:0][TC_W-1:0]  tc;
  int checks = 0, failures = 0;

  threshold_derivation dut (
    .qp(qp), .bs(bs), .beta_offset_div2(boff), .tc_offset_div2(toff), .beta(beta), .tc(tc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = -6; o <= 6; o += 3) begin
      for (int q = 0; q <= 51; q++) begin
        qp   = 6'(q);
        boff = 4'(o);
        toff = 4'(-o);
        bs   = {2'd2, 2'd1, 2'd0, 2'd2};
        #1;
        checks++;
        if (int'(beta) != ref_beta(q, o)) begin
          failures++;
          $display("beta mismatch qp=%0d off=%0d got %0d want %0d", q, o, beta, ref_beta(q, o));
        end
        for (int u = 0; u < N_UNITS; u++) begin
          checks++;
          if (int'(tc[u]) != ref_tc(q, int'(bs[u]), -o)) begin
            failures++;
            $display("tc mismatch qp=%0d bs=%0d off=%0d got %0d want %0d",
                     q, bs[u], -o, tc[u], ref_tc(q, int'(bs[u]), -o));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
