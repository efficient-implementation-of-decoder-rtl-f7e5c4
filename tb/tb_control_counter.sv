// tb_control_counter: the frame counter must count 0..23 after reset and
// wrap, with frame_start at 0 and frame_end at 23.
module tb_control_counter;
  logic       clk = 0, rst_n = 0;
  logic [4:0] cnt;
  logic       frame_start, frame_end;
  int checks = 0, failures = 0;

  control_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 24 * 5; c++) begin
      checks++; if (cnt != 5'(c % 24))               begin failures++; $display("FAIL cnt %0d at %0d", cnt, c); end
      checks++; if (frame_start != (c % 24 == 0))    begin failures++; $display("FAIL start at %0d", c); end
      checks++; if (frame_end != (c % 24 == 23))     begin failures++; $display("FAIL end at %0d", c); end
      @(negedge clk);
    end
    rst_n = 0;
    @(negedge clk);
    checks++; if (cnt != 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
