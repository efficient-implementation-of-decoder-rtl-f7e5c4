// tb_error_pattern_gen: for random sets of 5 distinct positions and every
// test pattern number (0..15), the mask must match the reference pattern
// table.
module tb_error_pattern_gen;
  import golay_pkg::*;
  import golay_ref_pkg::*;
  idx_t         tp;
  idx_t         lrp [L_LRP];
  logic [K-1:0] mask;
  int checks = 0, failures = 0;

  error_pattern_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lrp_t r;
    int   perm [12];
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 12; i++) perm[i] = i;
      perm.shuffle();
      for (int k = 0; k < L_LRP; k++) begin
        r[k]   = perm[k];
        lrp[k] = 4'(perm[k]);
      end
      for (int p = 0; p < N_TP_MAX; p++) begin
        tp = 4'(p);
        #1;
        checks++;
        if (mask != ref_mask(p, r)) begin
          failures++;
          if (failures < 10) $display("FAIL tp %0d mask %h exp %h", p, mask, ref_mask(p, r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
