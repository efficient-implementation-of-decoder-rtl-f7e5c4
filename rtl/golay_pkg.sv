// golay_pkg: types and constants shared by the soft-decision Golay (24,12)
// decoder.
//
// A received frame is 24 soft symbols. Symbols 0..11 are the systematic
// data bits d, symbols 12..23 the parity bits p = d*P. Each soft symbol is a
// sign bit and a 3-bit magnitude (q = 3 bits plus sign, as in the reference
// architecture). The BPSK mapping is bit 0 -> positive sample, bit 1 ->
// negative sample, so the sign bit is the hard decision and the magnitude is
// its reliability.
//
// The decoder tries 12 test patterns on the data half and 12 on the parity
// half. The reference architecture fixes the count (12 + 12) and the 5 least
// reliable positions per half, but not which 12 patterns; this package
// defines them (tp_ranks): no flip, each of the 5 single flips, and the 6
// double flips among the 4 least reliable positions. Patterns 12..15 add
// the 4 pairs with the fifth position, for the 16 + 16 configuration that
// the document also evaluates (all flips of up to two of the 5 positions).
//
// The elementary (8,4,4) extended Hamming code is the one whose 14 weight-4
// codewords are, in decimal with the message in the high nibble and the
// parity in the low nibble, 29 39 58 78 83 105 116 139 150 172 177 197 216
// 226 (the document's code C1):
// message bits 1,2,4,8 give parities 4'hD, 4'h7, 4'hE, 4'hB. The inter-layer
// permutation of the Cortex encoder (CORTEX_PERM) is this design's choice:
// it is one of the permutations that make the three-layer construction a
// [24,12,8] code, that is the extended Golay code.
package golay_pkg;

  localparam int N      = 24;  // code length
  localparam int K      = 12;  // data bits
  localparam int Q      = 3;   // magnitude bits of a soft symbol
  localparam int L_LRP  = 5;   // least reliable positions per half
  localparam int N_TP   = 12;  // test patterns per half (main configuration)
  localparam int N_TP_MAX = 16; // largest pattern set (1 + 5 + 10)
  localparam int IDXW   = 4;   // index inside a half (0..11)
  localparam int MAGW   = Q + 1;              // sorter magnitude, 8 = empty
  localparam int METW   = 8;                  // metric width: 24*7 = 168 < 256
  localparam int FRAME  = N;                  // clocks per frame
  localparam int CNTW   = 5;                  // frame counter width

  typedef struct packed {
    logic         sign;  // 1: negative sample, hard decision 1
    logic [Q-1:0] mag;   // reliability
  } soft_t;

  typedef logic [IDXW-1:0] idx_t;
  typedef logic [METW-1:0] metric_t;

  // Parity nibble of the elementary code for each message bit.
  localparam logic [3:0] HAM_ROW [4] = '{4'hD, 4'h7, 4'hE, 4'hB};

  // Cortex inter-layer permutation: bit i of the next layer's input is
  // bit CORTEX_PERM[i] of the previous layer's output.
  localparam int CORTEX_PERM [K] = '{6, 4, 11, 0, 8, 3, 9, 2, 1, 10, 7, 5};

  // Elementary (8,4,4) encoder: parity of a nibble. With transpose set, the
  // transposed matrix is applied, which is the inverse because the code is
  // self-dual (H * H^t = I).
  function automatic logic [3:0] ham_parity(input logic [3:0] d, input bit transpose);
    logic [3:0] p;
    p = '0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        if (transpose ? (d[i] & HAM_ROW[j][i]) : (d[j] & HAM_ROW[j][i]))
          p[transpose ? j : i] ^= 1'b1;
    return p;
  endfunction

  // Which of the 5 least reliable positions (by rank, 0 = least reliable)
  // test pattern tp flips.
  function automatic logic [L_LRP-1:0] tp_ranks(input logic [IDXW-1:0] tp);
    case (tp)
      4'd0:    return 5'b00000;
      4'd1:    return 5'b00001;
      4'd2:    return 5'b00010;
      4'd3:    return 5'b00100;
      4'd4:    return 5'b01000;
      4'd5:    return 5'b10000;
      4'd6:    return 5'b00011;
      4'd7:    return 5'b00101;
      4'd8:    return 5'b01001;
      4'd9:    return 5'b00110;
      4'd10:   return 5'b01010;
      4'd11:   return 5'b01100;
      4'd12:   return 5'b10001;
      4'd13:   return 5'b10010;
      4'd14:   return 5'b10100;
      4'd15:   return 5'b11000;
      default: return 5'b00000;
    endcase
  endfunction

endpackage
