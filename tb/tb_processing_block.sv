// tb_processing_block: a random received frame (noisy codeword or plain
// random symbols) and its least reliable positions are loaded, then the 12
// steps are run. The decision must equal the reference decoder's: data,
// metric, origin and winning test pattern.
module tb_processing_block;
  import golay_pkg::*;
  import golay_ref_pkg::*;
  logic         clk = 0, rst_n = 0, load = 0, step_en = 0, first = 0;
  soft_t        samples [N];
  idx_t         lrp_d [L_LRP];
  idx_t         lrp_p [L_LRP];
  idx_t         tp;
  logic [K-1:0] best_data;
  metric_t      best_metric;
  logic         best_from_p;
  idx_t         best_tp;
  int checks = 0, failures = 0, n_p = 0, n_flip = 0;

  processing_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20 * 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] cw, h;
    logic [2:0]  mg [24], md [12], mp [12];
    lrp_t        rd, rp;
    ref_result_t r;
    tp = 0;
    for (int i = 0; i < N; i++) samples[i] = '0;
    for (int k = 0; k < L_LRP; k++) begin lrp_d[k] = 0; lrp_p[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      cw = ref_encode(12'($urandom));
      for (int i = 0; i < N; i++) begin
        samples[i].sign = cw[i] ^ ($urandom_range(0, 9) == 0);
        samples[i].mag  = 3'($urandom);
        if (t % 4 == 3) samples[i] = soft_t'($urandom);
        h[i]  = samples[i].sign;
        mg[i] = samples[i].mag;
      end
      for (int i = 0; i < 12; i++) begin md[i] = mg[i]; mp[i] = mg[12+i]; end
      rd = ref_lrp(md);
      rp = ref_lrp(mp);
      for (int k = 0; k < L_LRP; k++) begin lrp_d[k] = 4'(rd[k]); lrp_p[k] = 4'(rp[k]); end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int i = 0; i < N; i++) samples[i] = soft_t'($urandom);  // must not matter now
      for (int s = 0; s < N_TP; s++) begin
        step_en = 1; first = (s == 0); tp = 4'(s);
        @(negedge clk);
      end
      step_en = 0;
      r = ref_decode(h, mg);
      if (r.from_p) n_p++;
      if (r.tp != 0) n_flip++;
      checks++;
      if (best_data != r.data || int'(best_metric) != r.metric || best_from_p != r.from_p || int'(best_tp) != r.tp) begin
        failures++;
        if (failures < 10) $display("FAIL trial %0d: %h/%0d exp %h/%0d", t, best_data, best_metric, r.data, r.metric);
      end
    end
    checks++; if (n_p == 0 || n_flip == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
