// lrp_sorter: finds the L least reliable positions of a half frame.
//
// Symbols arrive one per clock with their magnitude and their position.
// The sorter holds a list of L (position, magnitude) entries in increasing
// magnitude; a new symbol is inserted in front of the first entry whose
// magnitude is strictly larger, and the last entry drops out. Equal
// magnitudes therefore keep arrival order (earlier = less reliable). With
// clear, the list restarts holding only the current symbol; empty entries
// carry magnitude 2**Q, larger than any real one. One insertion per clock,
// result valid the clock after the last insertion. An assertion checks that
// the list stays in order.
// The successive search for the least reliable positions is the
// document's; insertion sorting and the tie rule are this design's.
module lrp_sorter
  import golay_pkg::*;
#(
  parameter int L = L_LRP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [Q-1:0]    mag,
  input  idx_t            idx,
  output idx_t            pos  [L],
  output logic [MAGW-1:0] pmag [L]
);

  localparam logic [MAGW-1:0] EMPTY = MAGW'(1 << Q);

  idx_t            cur_pos [L];
  logic [MAGW-1:0] cur_mag [L];
  logic [L-1:0]    ins;       // entry j is displaced by the new symbol
  logic [L-1:0]    ins_prev;  // entry j-1 is displaced (0 for j = 0)

  always_comb begin
    for (int j = 0; j < L; j++)
      ins[j] = ({1'b0, mag} < cur_mag[j]);
    ins_prev = {ins[L-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) begin
        cur_pos[j] <= '0;
        cur_mag[j] <= EMPTY;
      end
    end else if (clear) begin
      for (int j = 0; j < L; j++) begin
        cur_pos[j] <= (j == 0) ? idx : '0;
        cur_mag[j] <= (j == 0) ? {1'b0, mag} : EMPTY;
      end
    end else if (en) begin
      for (int j = 0; j < L; j++) begin
        if (ins[j]) begin
          if (!ins_prev[j]) begin
            cur_pos[j] <= idx;
            cur_mag[j] <= {1'b0, mag};
          end else begin
            cur_pos[j] <= cur_pos[(j == 0) ? 0 : j-1];
            cur_mag[j] <= cur_mag[(j == 0) ? 0 : j-1];
          end
        end
      end
    end
  end

  // The list is kept in non-decreasing magnitude order.
  logic list_sorted;
  always_comb begin
    list_sorted = 1'b1;
    for (int j = 0; j < L - 1; j++)
      if (cur_mag[j] > cur_mag[j+1]) list_sorted = 1'b0;
  end

  a_sorted: assert property (@(posedge clk) disable iff (!rst_n) list_sorted)
    else $error("lrp_sorter: list out of order");

  assign pos  = cur_pos;
  assign pmag = cur_mag;

endmodule
