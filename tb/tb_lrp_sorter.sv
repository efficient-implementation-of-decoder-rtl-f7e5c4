// tb_lrp_sorter: random half frames of 12 magnitudes (with many ties) are
// inserted, one per clock, the first with clear. After the 12th the list
// must equal the first 5 positions of a stable ascending sort, with their
// magnitudes; after fewer symbols, empty entries must read 8.
module tb_lrp_sorter;
  import golay_pkg::*;
  import golay_ref_pkg::*;
  logic            clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [2:0]      mag;
  idx_t            idx;
  idx_t            pos  [L_LRP];
  logic [MAGW-1:0] pmag [L_LRP];
  int checks = 0, failures = 0;

  lrp_sorter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] m [12];
    lrp_t       r;
    mag = 0; idx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int range_;
      range_ = (t % 3 == 0) ? 2 : 7;
      for (int i = 0; i < 12; i++) m[i] = 3'($urandom_range(0, range_));
      for (int i = 0; i < 12; i++) begin
        clear = (i == 0);
        en    = 1;
        mag   = m[i];
        idx   = 4'(i);
        @(negedge clk);
        if (i == 2) begin
          // only 3 symbols so far: entries 3 and 4 empty
          checks++; if (pmag[3] != 8 || pmag[4] != 8) begin failures++; $display("FAIL empty entries"); end
        end
      end
      clear = 0; en = 0;
      r = ref_lrp(m);
      for (int k = 0; k < L_LRP; k++) begin
        checks++;
        if (int'(pos[k]) != r[k] || pmag[k] != {1'b0, m[r[k]]}) begin
          failures++;
          if (failures < 10) $display("FAIL trial %0d rank %0d: pos %0d exp %0d", t, k, pos[k], r[k]);
        end
      end
      @(negedge clk);  // idle clock: list must hold
      checks++; if (int'(pos[0]) != r[0]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
