// tb_selection_unit: random sequences of 12 candidate pairs with small
// metrics (many ties). After the last step the unit must hold the first
// candidate of smallest metric in the order data 0, parity 0, data 1, ...
module tb_selection_unit;
  import golay_pkg::*;
  logic         clk = 0, rst_n = 0, en = 0, first = 0;
  idx_t         tp;
  logic [K-1:0] d_data, p_data, best_data;
  metric_t      d_metric, p_metric, best_metric;
  logic         best_from_p;
  idx_t         best_tp;
  int checks = 0, failures = 0;

  selection_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          bm, btp;
    logic [11:0] bd;
    bit          bp;
    tp = 0; d_data = 0; p_data = 0; d_metric = 0; p_metric = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      bm = 1 << 20;
      for (int s = 0; s < 12; s++) begin
        en = 1; first = (s == 0); tp = 4'(s);
        d_data = 12'($urandom); p_data = 12'($urandom);
        d_metric = 8'($urandom_range(0, (t % 2) ? 6 : 200));
        p_metric = 8'($urandom_range(0, (t % 2) ? 6 : 200));
        if (int'(d_metric) < bm) begin bm = d_metric; bd = d_data; bp = 0; btp = s; end
        if (int'(p_metric) < bm) begin bm = p_metric; bd = p_data; bp = 1; btp = s; end
        @(negedge clk);
        // an idle clock now and then must change nothing
        if ($urandom_range(0, 4) == 0) begin
          en = 0; first = 0; d_metric = 0; @(negedge clk);
        end
      end
      en = 0;
      checks++;
      if (best_data != bd || int'(best_metric) != bm || best_from_p != bp || int'(best_tp) != btp) begin
        failures++;
        if (failures < 10) $display("FAIL trial %0d: %h/%0d exp %h/%0d", t, best_data, best_metric, bd, bm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
