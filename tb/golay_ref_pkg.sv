// golay_ref_pkg: reference model used by the testbenches.
//
// It is written independently of the RTL: the Golay code is given here by
// its parity matrix P (row i = parity bits of data word with only bit i
// set) and by P^t, not by the layered Cortex structure, and the (8,4,4)
// code by its list of codewords. The reference decoder sorts the
// reliabilities of each half with a stable sort, applies the first 12 (or 16) test
// patterns to both halves, re-encodes by matrix products, and keeps the
// first candidate of minimum discrepancy metric in the order
// (tp 0 data, tp 0 parity, tp 1 data, ...).
package golay_ref_pkg;

  localparam logic [11:0] P_ROWS [12] = '{
    12'h376, 12'hfa2, 12'h9d3, 12'h1af, 12'ha9e, 12'hd4e,
    12'h71b, 12'ha6b, 12'h4fa, 12'hc37, 12'hffd, 12'h6c7};
  localparam logic [11:0] PT_ROWS [12] = '{
    12'hecc, 12'hbff, 12'he39, 12'h5f8, 12'h755, 12'h78b,
    12'hda5, 12'hd1e, 12'h46f, 12'hcd3, 12'hf62, 12'h6b6};

  // Codewords of the elementary (8,4,4) code: message high nibble.
  localparam int C1_WORDS [16] = '{0, 29, 39, 58, 78, 83, 105, 116, 139, 150,
                                   172, 177, 197, 216, 226, 255};

  function automatic logic [3:0] ref_ham(input logic [3:0] d);
    for (int i = 0; i < 16; i++)
      if (C1_WORDS[i][7:4] == d) return 4'(C1_WORDS[i]);
    return 4'hx;
  endfunction

  function automatic logic [11:0] mat_mul(input logic [11:0] x, input bit transposed);
    logic [11:0] r = '0;
    for (int i = 0; i < 12; i++)
      if (x[i]) r ^= transposed ? PT_ROWS[i] : P_ROWS[i];
    return r;
  endfunction

  function automatic logic [23:0] ref_encode(input logic [11:0] d);
    return {mat_mul(d, 1'b0), d};
  endfunction

  // Stable ascending sort of 12 magnitudes; first 5 positions.
  typedef int lrp_t [5];
  function automatic lrp_t ref_lrp(input logic [2:0] m [12]);
    lrp_t r;
    bit   used [12];
    for (int i = 0; i < 12; i++) used[i] = 0;
    for (int k = 0; k < 5; k++) begin
      int best = -1;
      for (int i = 0; i < 12; i++)
        if (!used[i] && (best < 0 || m[i] < m[best])) best = i;
      used[best] = 1;
      r[k] = best;
    end
    return r;
  endfunction

  // Test pattern tp as a list of ranks (independent table): none, the 5
  // single flips, then the pairs, those with rank 4 last.
  function automatic logic [11:0] ref_mask(input int tp, input lrp_t lrp);
    int pa [10] = '{0, 0, 0, 1, 1, 2, 0, 1, 2, 3};
    int pb [10] = '{1, 2, 3, 2, 3, 3, 4, 4, 4, 4};
    logic [11:0] m = '0;
    if (tp >= 1 && tp <= 5) m[lrp[tp-1]] = 1'b1;
    else if (tp >= 6) begin
      m[lrp[pa[tp-6]]] = 1'b1;
      m[lrp[pb[tp-6]]] = 1'b1;
    end
    return m;
  endfunction

  function automatic int ref_metric(input logic [23:0] c, input logic [23:0] h,
                                    input logic [2:0] mag [24]);
    int s = 0;
    for (int i = 0; i < 24; i++) if (c[i] != h[i]) s += int'(mag[i]);
    return s;
  endfunction

  typedef struct {
    logic [11:0] data;
    int          metric;
    bit          from_p;
    int          tp;
  } ref_result_t;

  function automatic ref_result_t ref_decode(input logic [23:0] h, input logic [2:0] mag [24],
                                             input int ntp = 12);
    ref_result_t r;
    logic [2:0]  md [12];
    logic [2:0]  mp [12];
    lrp_t        ld, lp;
    for (int i = 0; i < 12; i++) begin
      md[i] = mag[i];
      mp[i] = mag[12+i];
    end
    ld = ref_lrp(md);
    lp = ref_lrp(mp);
    r.metric = 1 << 30;
    for (int tp = 0; tp < ntp; tp++) begin
      logic [11:0] dd = h[11:0] ^ ref_mask(tp, ld);
      logic [11:0] pp = h[23:12] ^ ref_mask(tp, lp);
      int md_ = ref_metric({mat_mul(dd, 1'b0), dd}, h, mag);
      int mp_ = ref_metric({pp, mat_mul(pp, 1'b1)}, h, mag);
      if (md_ < r.metric) begin
        r.metric = md_; r.data = dd; r.from_p = 0; r.tp = tp;
      end
      if (mp_ < r.metric) begin
        r.metric = mp_; r.data = mat_mul(pp, 1'b1); r.from_p = 1; r.tp = tp;
      end
    end
    return r;
  endfunction

endpackage
