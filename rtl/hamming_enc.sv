// hamming_enc: elementary (8,4,4) extended Hamming encoder, the building
// block of the Cortex Golay encoder.
//
// Combinational. From a 4-bit message d it forms the 4 parity bits of the
// systematic codeword {d, p}: message bits 1,2,4,8 give parities 4'hD,
// 4'h7, 4'hE, 4'hB, so the weight-4 codewords {d, p} are 29, 39, 58, 78, 83,
// 105, 116, 139, 150, 172, 177, 197, 216 and 226 (the document's code
// C1). Because this code is self-dual its parity matrix H satisfies
// H * H^t = I, so setting
// TRANSPOSE applies H^t and recovers the message from the parity bits; the
// reverse Cortex encoder uses that. The code follows the document; the
// TRANSPOSE option and the bit ordering are this design's choice.
module hamming_enc
  import golay_pkg::*;
#(
  parameter bit TRANSPOSE = 1'b0
) (
  input  logic [3:0] d,
  output logic [3:0] p
);

  always_comb p = ham_parity(d, TRANSPOSE);

endmodule
