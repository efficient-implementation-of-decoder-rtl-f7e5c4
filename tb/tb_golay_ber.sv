// tb_golay_ber: near-ML check of the decoder over noisy channels, in both
// test-pattern configurations (12 + 12, the main one, and 16 + 16).
//
// Frames of random data are encoded, BPSK-modulated (+-8) and disturbed by
// approximately Gaussian noise at three levels, quantized to sign + 3-bit
// magnitude and fed to two decoders at once: one with the default 12
// patterns per half and one with 16. For every frame the testbench also
// runs an exhaustive maximum-likelihood search over all 4096 codewords on
// the same quantized samples, and the reference list decoder with 16
// patterns. Per noise level it reports the frame errors of both decoders
// and of ML decoding.
// Checks: the 16-pattern decoder matches the reference; neither decoder's
// metric is below the ML metric, and the 16-pattern metric is never above
// the 12-pattern one (it tries a superset of candidates); per level each
// decoder makes at most 50% more frame errors than ML decoding, plus 3.
// The noise levels correspond to Eb/N0 of roughly 4.3, 1.2 and -1.0 dB
// before quantization; at the two lower ones a 24-candidate list decoder
// is expected to lose some frames that ML decoding still gets right.
module tb_golay_ber;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  localparam int NLEVELS   = 3;
  localparam int PER_LEVEL = 300;
  localparam int NFRAMES   = NLEVELS * PER_LEVEL;
  localparam int LEVELS [NLEVELS] = '{2, 3, 4};

  logic    clk = 1'b0, rst_n = 1'b0;
  soft_t   in_sym;
  logic    in_valid;
  logic    frame_start [2], out_bit [2], out_valid [2], out_first [2], out_from_parity [2];
  metric_t out_metric [2];

  golay_soft_decoder dut12 (
    .clk, .rst_n, .in_sym, .in_valid,
    .frame_start (frame_start[0]), .out_bit (out_bit[0]), .out_valid (out_valid[0]),
    .out_first (out_first[0]), .out_metric (out_metric[0]), .out_from_parity (out_from_parity[0])
  );

  golay_soft_decoder #(.N_TP_HALF(16)) dut16 (
    .clk, .rst_n, .in_sym, .in_valid,
    .frame_start (frame_start[1]), .out_bit (out_bit[1]), .out_valid (out_valid[1]),
    .out_first (out_first[1]), .out_metric (out_metric[1]), .out_from_parity (out_from_parity[1])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat ((NFRAMES + 10) * N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [11:0] truth;
    logic [11:0] ml_data;
    int          ml_metric;
    ref_result_t r16;
    int          level;
  } exp_t;
  exp_t exp_q[$];

  int dec_err [2][NLEVELS], ml_err [NLEVELS], n16_better = 0;

  function automatic soft_t channel(input logic b, input int lvl);
    int y = b ? -8 : 8;
    soft_t s;
    for (int k = 0; k < 12; k++) y += int'($urandom_range(0, 2 * lvl)) - lvl;
    s.sign = (y < 0);
    y = (y < 0) ? -y : y;
    y = y / 2;
    s.mag = (y > 7) ? 3'd7 : 3'(y);
    return s;
  endfunction

  initial begin
    soft_t       fr [N];
    logic [23:0] cw, h;
    logic [2:0]  mg [24];
    logic [11:0] d;
    exp_t        e;
    int          mt;
    for (int l = 0; l < NLEVELS; l++) begin
      dec_err[0][l] = 0; dec_err[1][l] = 0; ml_err[l] = 0;
    end
    in_sym = '0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      d  = 12'($urandom);
      cw = ref_encode(d);
      e.level = f / PER_LEVEL;
      for (int i = 0; i < N; i++) begin
        fr[i] = channel(cw[i], LEVELS[e.level]);
        h[i]  = fr[i].sign;
        mg[i] = fr[i].mag;
      end
      e.truth = d;
      e.r16 = ref_decode(h, mg, 16);
      e.ml_metric = 1 << 30;
      for (int c = 0; c < 4096; c++) begin
        mt = ref_metric(ref_encode(12'(c)), h, mg);
        if (mt < e.ml_metric) begin e.ml_metric = mt; e.ml_data = 12'(c); end
      end
      while (!frame_start[0]) @(negedge clk);
      exp_q.push_back(e);
      for (int i = 0; i < N; i++) begin
        in_sym = fr[i]; in_valid = 1'b1;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (3 * N) @(negedge clk);
    for (int l = 0; l < NLEVELS; l++) begin
      $display("noise level %0d: frames %0d, frame errors: 12+12 patterns %0d, 16+16 patterns %0d, ML %0d",
               LEVELS[l], PER_LEVEL, dec_err[0][l], dec_err[1][l], ml_err[l]);
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (dec_err[k][l] * 2 > ml_err[l] * 3 + 6) begin
          failures++;
          $display("FAIL level %0d: decoder %0d not near ML", LEVELS[l], k);
        end
      end
    end
    $display("frames where 16+16 found a better codeword than 12+12: %0d", n16_better);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL frames missing"); end
    checks++; if (n16_better == 0) begin failures++; $display("FAIL 16 patterns never helped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Both decoders run in lock step: collect both outputs.
  logic [11:0] got [2];
  int          nbits = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid[0]) begin
      checks++;
      if (!out_valid[1]) begin failures++; $display("FAIL decoders out of step"); end
      got[0][nbits] = out_bit[0];
      got[1][nbits] = out_bit[1];
      nbits++;
      if (nbits == K) begin
        exp_t e;
        nbits = 0;
        e = exp_q.pop_front();
        checks += 4;
        if (got[1] != e.r16.data || int'(out_metric[1]) != e.r16.metric) begin
          failures++; $display("FAIL 16-pattern decoder differs from reference");
        end
        if (int'(out_metric[0]) < e.ml_metric || int'(out_metric[1]) < e.ml_metric) begin
          failures++; $display("FAIL metric below ML");
        end
        if (out_metric[1] > out_metric[0]) begin
          failures++; $display("FAIL 16 patterns worse than 12");
        end
        if (out_metric[1] < out_metric[0]) n16_better++;
        for (int k = 0; k < 2; k++) if (got[k] != e.truth) dec_err[k][e.level]++;
        if (e.ml_data != e.truth) ml_err[e.level]++;
      end
    end
  end

endmodule
