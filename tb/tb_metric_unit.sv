// tb_metric_unit: random candidates, hard decisions and magnitudes; the
// metric must equal the sum of magnitudes where they differ, including
// the all-different, all-7 maximum of 168.
module tb_metric_unit;
  import golay_pkg::*;
  import golay_ref_pkg::*;
  logic [N-1:0] cand, hard;
  logic [Q-1:0] mag [N];
  metric_t      metric;
  int checks = 0, failures = 0;

  metric_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cand = 24'($urandom);
      hard = (t == 0) ? ~cand : 24'($urandom);
      for (int i = 0; i < N; i++) mag[i] = (t == 0) ? 3'd7 : 3'($urandom);
      #1;
      checks++;
      if (int'(metric) != ref_metric(cand, hard, mag)) begin
        failures++;
        if (failures < 10) $display("FAIL metric %0d exp %0d", metric, ref_metric(cand, hard, mag));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
