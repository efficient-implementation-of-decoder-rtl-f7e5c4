// tb_tx_piso: random words are loaded with random gaps; the next 12
// clocks must show bits 0..11 with busy high and first only on bit 0,
// then busy low.
module tb_tx_piso;
  logic        clk = 0, rst_n = 0, load = 0;
  logic [11:0] din;
  logic        dout, busy, first;
  int checks = 0, failures = 0;

  tx_piso dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] w;
    din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (busy) begin failures++; $display("FAIL busy after reset"); end
    for (int t = 0; t < 200; t++) begin
      w = 12'($urandom);
      din = w; load = 1;
      @(negedge clk);
      load = 0; din = 12'($urandom);
      for (int b = 0; b < 12; b++) begin
        checks++;
        if (dout != w[b] || !busy || first != (b == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d", t, b);
        end
        @(negedge clk);
      end
      checks++; if (busy) begin failures++; $display("FAIL busy after 12 bits"); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
