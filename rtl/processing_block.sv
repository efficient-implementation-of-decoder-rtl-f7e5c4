// processing_block: candidate generation, re-encoding, scoring and choice.
//
// With load, the block copies a complete received frame (24 soft samples
// and the two lists of 5 least reliable positions) into its own registers,
// so the reception block can take the next frame meanwhile. Then, for each
// clock with step_en, test pattern tp is applied in parallel to both halves:
//   data branch:   d' = hard(d) ^ mask_d,   candidate {d' * P,   d'}
//   parity branch: p' = hard(p) ^ mask_p,   candidate {p', p' * P^t}
// Both candidates are scored (metric_unit) and passed to the selection
// unit. After the steps tp = 0..11 (0..15 in the 16 + 16 configuration)
// the 12 data bits of the best candidate are on best_data, one clock after
// the last step.
// The two parallel branches, the re-encoding in both directions and the
// metric are the document's; the one-pattern-pair-per-clock schedule is
// this design's.
module processing_block
  import golay_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  soft_t        samples [N],
  input  idx_t         lrp_d   [L_LRP],
  input  idx_t         lrp_p   [L_LRP],
  input  logic         step_en,
  input  logic         first,
  input  idx_t         tp,
  output logic [K-1:0] best_data,
  output metric_t      best_metric,
  output logic         best_from_p,
  output idx_t         best_tp
);

  // Frame memory of this pipeline stage.
  logic [N-1:0] hard;
  logic [Q-1:0] mag    [N];
  idx_t         lrp_dq [L_LRP];
  idx_t         lrp_pq [L_LRP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hard <= '0;
      for (int i = 0; i < N; i++) mag[i] <= '0;
      for (int r = 0; r < L_LRP; r++) begin
        lrp_dq[r] <= '0;
        lrp_pq[r] <= '0;
      end
    end else if (load) begin
      for (int i = 0; i < N; i++) begin
        hard[i] <= samples[i].sign;
        mag[i]  <= samples[i].mag;
      end
      lrp_dq <= lrp_d;
      lrp_pq <= lrp_p;
    end
  end

  // Data branch.
  logic [K-1:0] mask_d, cand_dd, cand_dp;
  metric_t      metric_d;

  error_pattern_gen u_tp_d (.tp(tp), .lrp(lrp_dq), .mask(mask_d));
  assign cand_dd = hard[K-1:0] ^ mask_d;
  cortex_encoder #(.INVERSE(1'b0)) u_enc_d (.x(cand_dd), .y(cand_dp));
  metric_unit u_met_d (.cand({cand_dp, cand_dd}), .hard(hard), .mag(mag), .metric(metric_d));

  // Parity branch.
  logic [K-1:0] mask_p, cand_pp, cand_pd;
  metric_t      metric_p;

  error_pattern_gen u_tp_p (.tp(tp), .lrp(lrp_pq), .mask(mask_p));
  assign cand_pp = hard[N-1:K] ^ mask_p;
  cortex_encoder #(.INVERSE(1'b1)) u_enc_p (.x(cand_pp), .y(cand_pd));
  metric_unit u_met_p (.cand({cand_pp, cand_pd}), .hard(hard), .mag(mag), .metric(metric_p));

  selection_unit u_sel (
    .clk, .rst_n,
    .en       (step_en),
    .first    (first),
    .tp       (tp),
    .d_data   (cand_dd),
    .d_metric (metric_d),
    .p_data   (cand_pd),
    .p_metric (metric_p),
    .best_data, .best_metric, .best_from_p, .best_tp
  );

endmodule
