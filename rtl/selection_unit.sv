// selection_unit: keeps the best candidate codeword of a frame.
//
// Each enabled clock brings one data-part and one parity-part candidate
// (their 12 data bits and metrics). The smaller metric of the two wins the
// step, the data-part candidate on a tie; the step winner replaces the
// stored decision when first is set (first step of a frame) or when its
// metric is strictly smaller than the stored one, so on ties the earlier
// candidate stays. Outputs are registered and hold the decision until the
// next first step. The comparator choosing the best of the 24 candidates is
// the document's; first must come with en (asserted); the tie rule and the two-per-clock pairing are this
// design's.
module selection_unit
  import golay_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  idx_t         tp,
  input  logic [K-1:0] d_data,
  input  metric_t      d_metric,
  input  logic [K-1:0] p_data,
  input  metric_t      p_metric,
  output logic [K-1:0] best_data,
  output metric_t      best_metric,
  output logic         best_from_p,
  output idx_t         best_tp
);

  logic         step_p;
  logic [K-1:0] step_data;
  metric_t      step_metric;

  always_comb begin
    step_p      = (p_metric < d_metric);
    step_data   = step_p ? p_data   : d_data;
    step_metric = step_p ? p_metric : d_metric;
  end

  a_first_en: assert property (@(posedge clk) disable iff (!rst_n) first |-> en)
    else $error("selection_unit: first step without enable");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_data   <= '0;
      best_metric <= '0;
      best_from_p <= 1'b0;
      best_tp     <= '0;
    end else if (en && (first || step_metric < best_metric)) begin
      best_data   <= step_data;
      best_metric <= step_metric;
      best_from_p <= step_p;
      best_tp     <= tp;
    end
  end

endmodule
