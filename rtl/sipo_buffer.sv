// sipo_buffer: serial-in parallel-out store of the soft samples of a frame.
//
// On each clock with shift_en, the word array moves down by one and din
// enters at the top, so after DEPTH shifts q[i] holds the i-th symbol
// shifted in. All words are readable in parallel. The document describes
// this shift register in the reception block; its depth here is 24 (the
// whole frame, since the metric uses all 24 samples) and that, the reset
// to zero and the shift direction are this design's choices.
module sipo_buffer
  import golay_pkg::*;
#(
  parameter int DEPTH = N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_en,
  input  soft_t din,
  output soft_t q [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (shift_en) begin
      for (int i = 0; i < DEPTH - 1; i++) q[i] <= q[i+1];
      q[DEPTH-1] <= din;
    end
  end

endmodule
