// tx_piso: transmission block, parallel-in serial-out register.
//
// With load, the K decoded data bits are captured; from the next clock on,
// dout shows bit 0, then bit 1, ... one per clock for K clocks, with busy
// high and first high with bit 0. The PISO register is the document's; the
// bit order (bit 0 first) and the busy/first flags are this design's.
module tx_piso
  import golay_pkg::*;
#(
  parameter int WIDTH = K
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  output logic             dout,
  output logic             busy,
  output logic             first
);

  localparam int CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    left;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (load) begin
      shreg <= din;
      left  <= CW'(WIDTH);
    end else if (left != '0) begin
      shreg <= shreg >> 1;
      left  <= left - 1'b1;
    end
  end

  assign dout  = shreg[0];
  assign busy  = (left != '0);
  assign first = (left == CW'(WIDTH));

endmodule
