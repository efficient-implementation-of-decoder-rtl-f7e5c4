// tb_reception_block: random frames are fed one symbol per clock with a
// local 0..23 counter. In the clock after the last symbol (counter back at
// 0) the stored samples must equal the frame and the two lists must equal
// the 5 least reliable positions of each half (stable sort).
module tb_reception_block;
  import golay_pkg::*;
  import golay_ref_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [4:0] cnt;
  soft_t      in_sym;
  soft_t      samples [N];
  idx_t       lrp_d [L_LRP];
  idx_t       lrp_p [L_LRP];
  int checks = 0, failures = 0;

  reception_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (24 * 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    soft_t      fr [N];
    logic [2:0] md [12], mp [12];
    lrp_t       rd, rp;
    cnt = 0; in_sym = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) begin
        fr[i] = soft_t'($urandom);
        if (t % 2 == 0) fr[i].mag = 3'($urandom_range(0, 2));
      end
      for (int i = 0; i < N; i++) begin
        cnt = 5'(i); in_sym = fr[i];
        @(negedge clk);
      end
      cnt = 0;  // first clock of the next frame: results visible
      for (int i = 0; i < 12; i++) begin
        md[i] = fr[i].mag;
        mp[i] = fr[12+i].mag;
      end
      rd = ref_lrp(md);
      rp = ref_lrp(mp);
      for (int i = 0; i < N; i++) begin
        checks++; if (samples[i] != fr[i]) begin failures++; if (failures < 10) $display("FAIL sample %0d", i); end
      end
      for (int k = 0; k < L_LRP; k++) begin
        checks++; if (int'(lrp_d[k]) != rd[k]) begin failures++; if (failures < 10) $display("FAIL lrp_d %0d", k); end
        checks++; if (int'(lrp_p[k]) != rp[k]) begin failures++; if (failures < 10) $display("FAIL lrp_p %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
