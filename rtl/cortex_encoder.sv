// cortex_encoder: Cortex re-encoder of the extended Golay (24,12) code.
//
// The 12 input bits are cut into three nibbles, each nibble is replaced by
// its (8,4,4) Hamming parity, and the 12 resulting bits are permuted. This
// is done for three layers (no permutation after the last). With
// INVERSE = 0 the input is the data d and the output the parity p = d*P.
// Because the Golay code is self-dual, P^-1 = P^t; with INVERSE = 1 the same
// structure is run backwards (last layer first, inverse permutation,
// transposed Hamming blocks) and maps a parity word p to the data d = p*P^t.
//
// Purely combinational: three levels of small XOR trees. The layered
// construction with three Hamming encoders per layer repeated three times
// follows the document; the permutation (golay_pkg::CORTEX_PERM) is this
// design's own, chosen so that the result has minimum distance 8.
module cortex_encoder
  import golay_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter int LAYERS  = 3
) (
  input  logic [K-1:0] x,
  output logic [K-1:0] y
);

  logic [K-1:0] lin  [LAYERS];  // input of each layer
  logic [K-1:0] lout [LAYERS];  // output of each layer

  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    for (genvar g = 0; g < 3; g++) begin : g_ham
      hamming_enc #(.TRANSPOSE(INVERSE)) u_ham (
        .d(lin[l][4*g +: 4]),
        .p(lout[l][4*g +: 4])
      );
    end
  end

  assign lin[0] = x;
  for (genvar l = 1; l < LAYERS; l++) begin : g_perm
    for (genvar i = 0; i < K; i++) begin : g_bit
      if (!INVERSE) begin : g_fwd
        assign lin[l][i] = lout[l-1][CORTEX_PERM[i]];
      end else begin : g_inv
        assign lin[l][CORTEX_PERM[i]] = lout[l-1][i];
      end
    end
  end
  assign y = lout[LAYERS-1];

endmodule
