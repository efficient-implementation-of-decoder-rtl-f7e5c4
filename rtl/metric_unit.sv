// metric_unit: scores a candidate codeword against the received word.
//
// Combinational. The metric is the sum of the magnitudes of the received
// samples whose hard decision differs from the candidate bit. It differs
// from the correlation sum(+-r_i) only by a constant per frame, so the
// candidate with the smallest metric is the one with the largest
// correlation, the decision rule of the document. Using this discrepancy
// form (no signed adds, 8-bit result) is this design's choice.
module metric_unit
  import golay_pkg::*;
(
  input  logic [N-1:0]  cand,
  input  logic [N-1:0]  hard,
  input  logic [Q-1:0]  mag [N],
  output metric_t       metric
);

  always_comb begin
    metric = '0;
    for (int i = 0; i < N; i++)
      if (cand[i] != hard[i]) metric += METW'(mag[i]);
  end

endmodule
