// tb_gf16_mul: exhaustive check of the GF((2^2)^2) normal-basis multiplier.
// All 256 operand pairs are mapped into GF(2^8) through the basis (z, w) and
// compared with a polynomial-basis product modulo 0x1f5.
module tb_gf16_mul;
  import tb_gf_ref_pkg::*;

  logic [3:0] a, b, p;
  int checks = 0, failures = 0;

  gf16_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (emb16(p) != ref_mul(emb16(a), emb16(b))) begin
          failures++;
          $display("FAIL a=%h b=%h p=%h", a, b, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
