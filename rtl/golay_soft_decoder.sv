// golay_soft_decoder: soft-decision decoder for the extended Golay (24,12)
// code, built as a two-stage frame pipeline.
//
// Input: one soft symbol per clock (sign = hard decision, 3-bit magnitude =
// reliability). Symbol i of a frame must arrive in the clock where the
// internal frame counter equals i; frame_start marks symbol 0. in_valid is
// sampled with symbol 0 and tags the whole frame. Frames follow each other
// without gaps, one every 24 clocks.
//
// Stage 1 (reception, frame k): the 24 symbols are stored and the 5 least
// reliable positions of the data half and of the parity half are found.
// Stage 2 (processing, frame k+1): in the counter states 1..12, test pattern
// t = 0..11 is applied to both halves in parallel (states 1..16 and
// patterns 0..15 with N_TP_HALF = 16); each of the resulting 24
// candidates is re-encoded through the Cortex encoder (forward for the data
// half, reversed for the parity half), scored, and the best kept. At the
// last counter state the decision is loaded into the transmission PISO.
// Transmission (counter states 0..11 of frame k+2): the 12 decoded data
// bits leave on out_bit, bit 0 first, with out_valid.
// Latency: 48 clocks = 2n from symbol 0 in to data bit 0 out; throughput 12
// data bits per 24 clocks. Assertions check that the PISO is idle when a
// decision is loaded and that no processing step overlaps a frame load.
//
// The block structure (reception with SIPO and least-reliable-position
// search, processing with 12+12 test patterns and a comparator, PISO
// transmission, 5-bit counter control) and the sizes follow the document.
// The counter-state schedule, the ports, the in_valid tagging and the
// choice of the test patterns are this design's. N_TP_HALF = 16 gives the
// 16 + 16 pattern configuration of the document's performance study.
module golay_soft_decoder
  import golay_pkg::*;
#(
  // Test patterns per half: 12 (main configuration) up to 16.
  parameter int N_TP_HALF = N_TP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  soft_t   in_sym,
  input  logic    in_valid,
  output logic    frame_start,
  output logic    out_bit,
  output logic    out_valid,
  output logic    out_first,
  output metric_t out_metric,
  output logic    out_from_parity
);

  logic [CNTW-1:0] cnt;
  logic            frame_end;

  control_counter #(.FRAME_LEN(FRAME)) u_ctrl (
    .clk, .rst_n, .cnt, .frame_start, .frame_end
  );

  // Stage 1: reception.
  soft_t samples [N];
  idx_t  lrp_d   [L_LRP];
  idx_t  lrp_p   [L_LRP];

  reception_block u_rx (
    .clk, .rst_n, .cnt, .in_sym, .samples, .lrp_d, .lrp_p
  );

  // Stage 2: processing. Steps run in counter states 1..N_TP_HALF.
  logic         step_en;
  idx_t         tp;
  logic [K-1:0] best_data;
  metric_t      best_metric;
  logic         best_from_p;
  idx_t         best_tp;

  if (N_TP_HALF < 1 || N_TP_HALF > N_TP_MAX) begin : g_bad_ntp
    $error("golay_soft_decoder: N_TP_HALF must be 1..16");
  end

  assign step_en = (cnt >= CNTW'(1)) && (cnt <= CNTW'(N_TP_HALF));
  assign tp      = IDXW'(cnt - CNTW'(1));

  processing_block u_proc (
    .clk, .rst_n,
    .load    (frame_start),
    .samples, .lrp_d, .lrp_p,
    .step_en,
    .first   (cnt == CNTW'(1)),
    .tp,
    .best_data, .best_metric, .best_from_p, .best_tp
  );

  // Transmission.
  logic tx_busy;

  tx_piso #(.WIDTH(K)) u_tx (
    .clk, .rst_n,
    .load  (frame_end),
    .din   (best_data),
    .dout  (out_bit),
    .busy  (tx_busy),
    .first (out_first)
  );

  // Frame tags travel with the frame through the stages.
  logic    rx_valid, proc_valid, tx_valid;
  metric_t tx_metric;
  logic    tx_from_p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_valid   <= 1'b0;
      proc_valid <= 1'b0;
      tx_valid   <= 1'b0;
      tx_metric  <= '0;
      tx_from_p  <= 1'b0;
    end else begin
      if (frame_start) begin
        rx_valid   <= in_valid;
        proc_valid <= rx_valid;
      end
      if (frame_end) begin
        tx_valid  <= proc_valid;
        tx_metric <= best_metric;
        tx_from_p <= best_from_p;
      end
    end
  end

  assign out_valid       = tx_busy && tx_valid;
  assign out_metric      = tx_metric;
  assign out_from_parity = tx_from_p;

  // The PISO must have sent the previous decision before the next one is
  // loaded, and a processing step must never fall into the load clock.
  a_tx_free: assert property (@(posedge clk) disable iff (!rst_n) frame_end |-> !tx_busy)
    else $error("golay_soft_decoder: PISO reloaded while sending");
  a_no_step_on_load: assert property (@(posedge clk) disable iff (!rst_n) frame_start |-> !step_en)
    else $error("golay_soft_decoder: processing step during frame load");

  // best_tp is kept by the selection unit for observation only.
  idx_t unused_tp;
  assign unused_tp = best_tp;

endmodule
