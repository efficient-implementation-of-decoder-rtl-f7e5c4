// tb_hamming_enc: exhaustive test of the (8,4,4) elementary encoder.
// The forward encoder is compared for all 16 messages with the codeword
// list of the elementary code (0, 255 and its 14 weight-4 words); the
// transposed encoder must undo the forward one.
module tb_hamming_enc;
  import golay_ref_pkg::*;

  logic [3:0] d, p, pinv;
  int checks = 0, failures = 0;

  hamming_enc #(.TRANSPOSE(1'b0)) u_fwd (.d(d), .p(p));
  hamming_enc #(.TRANSPOSE(1'b1)) u_inv (.d(p), .p(pinv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      d = 4'(i);
      #1;
      checks++; if (p != ref_ham(d))  begin failures++; $display("FAIL fwd %h -> %h", d, p); end
      checks++; if (pinv != d)        begin failures++; $display("FAIL inv %h -> %h", p, pinv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
