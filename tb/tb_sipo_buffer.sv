// tb_sipo_buffer: random symbols are shifted in, with enable gaps; after
// each shift the parallel outputs must equal the last 24 symbols in order.
module tb_sipo_buffer;
  import golay_pkg::*;
  logic  clk = 0, rst_n = 0, shift_en = 0;
  soft_t din;
  soft_t q [N];
  soft_t model [N];
  int checks = 0, failures = 0;

  sipo_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      din      = soft_t'($urandom);
      @(negedge clk);
      if (shift_en) begin
        for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
        model[N-1] = din;
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] != model[i]) begin failures++; if (failures < 10) $display("FAIL q[%0d] cycle %0d", i, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
