// reception_block: serial input stage of the decoder.
//
// Symbol cnt of the frame arrives in the clock where the frame counter is
// cnt (0..23). Every symbol is shifted into a 24-deep SIPO store; symbols
// 0..11 (data part) feed one least-reliable-position sorter and symbols
// 12..23 (parity part) a second one. The sorters restart at the first symbol
// of their half. In the clock after the last symbol (cnt == 0 of the next
// frame) samples[i] is symbol i and lrp_d / lrp_p list the 5 least reliable
// positions of each half, least reliable first; the processing block copies
// them in that clock while this block starts on the next frame.
// The structure (SIPO plus successive search in both halves) is the
// document's; the exact timing is this design's.
module reception_block
  import golay_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CNTW-1:0] cnt,
  input  soft_t           in_sym,
  output soft_t           samples [N],
  output idx_t            lrp_d   [L_LRP],
  output idx_t            lrp_p   [L_LRP]
);

  logic            in_data;
  idx_t            half_idx;
  logic [MAGW-1:0] unused_dmag [L_LRP];
  logic [MAGW-1:0] unused_pmag [L_LRP];

  assign in_data  = (cnt < CNTW'(K));
  assign half_idx = in_data ? IDXW'(cnt) : IDXW'(cnt - CNTW'(K));

  sipo_buffer #(.DEPTH(N)) u_sipo (
    .clk, .rst_n,
    .shift_en (1'b1),
    .din      (in_sym),
    .q        (samples)
  );

  lrp_sorter #(.L(L_LRP)) u_sort_d (
    .clk, .rst_n,
    .clear (cnt == '0),
    .en    (in_data),
    .mag   (in_sym.mag),
    .idx   (half_idx),
    .pos   (lrp_d),
    .pmag  (unused_dmag)
  );

  lrp_sorter #(.L(L_LRP)) u_sort_p (
    .clk, .rst_n,
    .clear (cnt == CNTW'(K)),
    .en    (!in_data),
    .mag   (in_sym.mag),
    .idx   (half_idx),
    .pos   (lrp_p),
    .pmag  (unused_pmag)
  );

endmodule
