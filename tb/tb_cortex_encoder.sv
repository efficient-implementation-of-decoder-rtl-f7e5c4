// tb_cortex_encoder: exhaustive test of the Cortex re-encoder.
// For all 4096 data words the forward encoder must give d*P (reference
// matrix), the reverse encoder must map that parity back to d and must
// equal p*P^t. The minimum codeword weight must be 8 (extended Golay).
module tb_cortex_encoder;
  import golay_ref_pkg::*;

  logic [11:0] d, p, dback, pr, dr;
  int checks = 0, failures = 0, wmin = 99;

  cortex_encoder #(.INVERSE(1'b0)) u_fwd (.x(d), .y(p));
  cortex_encoder #(.INVERSE(1'b1)) u_inv (.x(p), .y(dback));
  cortex_encoder #(.INVERSE(1'b1)) u_inv2 (.x(pr), .y(dr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      d  = 12'(i);
      pr = 12'($urandom);
      #1;
      checks++; if (p != mat_mul(d, 1'b0))   begin failures++; if (failures < 10) $display("FAIL fwd %h", d); end
      checks++; if (dback != d)              begin failures++; if (failures < 10) $display("FAIL inv %h", d); end
      checks++; if (dr != mat_mul(pr, 1'b1)) begin failures++; if (failures < 10) $display("FAIL pt %h", pr); end
      if (i != 0 && $countones({p, d}) < wmin) wmin = $countones({p, d});
    end
    checks++; if (wmin != 8) begin failures++; $display("FAIL dmin %0d", wmin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
