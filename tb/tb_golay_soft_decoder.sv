// tb_golay_soft_decoder: end-to-end test of the soft-decision decoder at
// its default sizes.
//
// Random 12-bit data words are encoded with the reference parity matrix,
// BPSK-modulated (bit 0 -> +8, bit 1 -> -8), disturbed by approximately
// Gaussian noise (sum of 12 uniform values) of a level that changes from
// frame to frame, and quantized to sign plus 3-bit magnitude (|y|/2,
// saturated at 7). Frames are sent back to back, some marked invalid.
// For every valid frame the serial output is compared with the reference
// decoder (data, metric, list of origin), with the transmitted data for
// noiseless frames, and the first decoded bit must appear 48 clocks (2n)
// after symbol 0. The test also counts how often each mechanism of the
// decoder is exercised (test pattern 0, single and double flips winning,
// a parity-part candidate winning, errors corrected, invalid frames
// dropped) and fails if one never happens.
module tb_golay_soft_decoder;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  localparam int NFRAMES = 1500;
  localparam int LATENCY = 2 * N;

  logic    clk = 1'b0, rst_n = 1'b0;
  soft_t   in_sym;
  logic    in_valid;
  logic    frame_start, out_bit, out_valid, out_first, out_from_parity;
  metric_t out_metric;

  golay_soft_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Watchdog.
  initial begin
    repeat ((NFRAMES + 10) * N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results of valid frames, in order.
  typedef struct {
    ref_result_t r;
    logic [11:0] truth;
    bit          noiseless;
    int          start_cycle;
  } exp_t;
  exp_t exp_q[$];

  // Mechanism counters.
  int n_tp0 = 0, n_single = 0, n_double = 0, n_from_p = 0, n_from_d = 0;
  int n_corrected = 0, n_invalid = 0, n_frames_out = 0, n_b2b = 0;

  function automatic soft_t channel(input logic b, input int lvl);
    int y = b ? -8 : 8;
    int nz = 0;
    soft_t s;
    for (int k = 0; k < 12; k++) nz += int'($urandom_range(0, 2 * lvl)) - lvl;
    y += nz;
    s.sign = (y < 0);
    y = (y < 0) ? -y : y;
    y = y / 2;
    s.mag = (y > 7) ? 3'd7 : 3'(y);
    return s;
  endfunction

  // Stimulus: one frame per 24 clocks, aligned to frame_start.
  initial begin
    soft_t       fr [N];
    logic [23:0] cw, h;
    logic [2:0]  mg [24];
    logic [11:0] d;
    int          lvl;
    bit          v, prev_v;
    in_sym   = '0;
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_v = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      d   = 12'($urandom);
      cw  = ref_encode(d);
      lvl = (f < 20) ? 0 : f % 5;          // early frames noiseless
      v   = (f % 9 != 4);                  // some frames invalid
      for (int i = 0; i < N; i++) begin
        fr[i] = channel(cw[i], lvl);
        h[i]  = fr[i].sign;
        mg[i] = fr[i].mag;
      end
      // wait for symbol 0 slot
      while (!frame_start) @(negedge clk);
      if (v) begin
        exp_t e;
        e.r = ref_decode(h, mg);
        e.truth = d;
        e.noiseless = (lvl == 0);
        e.start_cycle = cycle;
        exp_q.push_back(e);
        if (e.r.tp == 0) n_tp0++;
        else if (e.r.tp <= 5) n_single++;
        else n_double++;
        if (e.r.from_p) n_from_p++; else n_from_d++;
        if (e.r.data != h[11:0]) n_corrected++;
        if (prev_v) n_b2b++;
      end else n_invalid++;
      prev_v = v;
      for (int i = 0; i < N; i++) begin
        in_sym   = fr[i];
        in_valid = v;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (3 * N) @(negedge clk);
    check(exp_q.size() == 0, "all valid frames decoded");
    check(n_frames_out == NFRAMES - n_invalid, "output frame count");
    check(n_tp0 > 0,       "mechanism: test pattern 0 wins");
    check(n_single > 0,    "mechanism: single-flip pattern wins");
    check(n_double > 0,    "mechanism: double-flip pattern wins");
    check(n_from_d > 0,    "mechanism: data-part candidate wins");
    check(n_from_p > 0,    "mechanism: parity-part candidate wins");
    check(n_corrected > 0, "mechanism: data bits corrected");
    check(n_invalid > 0,   "mechanism: invalid frame dropped");
    check(n_b2b > 0,       "mechanism: back-to-back frames");
    $display("frames=%0d invalid=%0d tp0=%0d single=%0d double=%0d from_d=%0d from_p=%0d corrected=%0d b2b=%0d",
             NFRAMES, n_invalid, n_tp0, n_single, n_double, n_from_d, n_from_p, n_corrected, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  logic [11:0] got;
  int          nbits = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (nbits == 0) begin
        check(out_first, "out_first on bit 0");
        if (exp_q.size() > 0)
          check(cycle - exp_q[0].start_cycle == LATENCY, $sformatf("latency 2n: %0d", cycle - exp_q[0].start_cycle));
      end else check(!out_first, "out_first only on bit 0");
      got[nbits] = out_bit;
      nbits++;
      if (nbits == K) begin
        nbits = 0;
        n_frames_out++;
        if (exp_q.size() == 0) check(0, "unexpected output frame");
        else begin
          exp_t e;
          e = exp_q.pop_front();
          check(got == e.r.data, $sformatf("data %h exp %h", got, e.r.data));
          check(int'(out_metric) == e.r.metric, "metric");
          check(out_from_parity == e.r.from_p, "origin");
          if (e.noiseless) check(got == e.truth, "noiseless frame decodes to sent data");
        end
      end
    end
  end

endmodule
