// control_counter: control block of the decoder.
//
// A 5-bit counter that runs 0..FRAME_LEN-1 and wraps, one step per clock.
// Its value is the position of the incoming symbol in the current frame, and
// every other block derives its enables from it: reception captures symbol
// cnt, processing loads a frame at cnt == 0 and evaluates test pattern cnt-1
// for cnt = 1..12, transmission loads at cnt == FRAME_LEN-1. The 5-bit
// counter is the document's; the decoding of its states is this design's.
// Synchronous active-low reset to 0.
module control_counter
  import golay_pkg::*;
#(
  parameter int FRAME_LEN = FRAME
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [CNTW-1:0] cnt,
  output logic            frame_start,
  output logic            frame_end
);

  always_ff @(posedge clk) begin
    if (!rst_n)                        cnt <= '0;
    else if (frame_end)                cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end

  assign frame_start = (cnt == '0);
  assign frame_end   = (cnt == CNTW'(FRAME_LEN - 1));

endmodule
