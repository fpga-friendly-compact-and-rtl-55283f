// tb_gf256_inv: exhaustive check of the tower-field inverter. Input and
// output are mapped into the polynomial basis with the published columns of
// X, and the output is compared with the polynomial-basis inverse.
module tb_gf256_inv;
  import tb_gf_ref_pkg::*;

  logic [7:0] a, q;
  int checks = 0, failures = 0;

  gf256_inv dut (.a(a), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (emb256(q) != ref_inv(emb256(a))) begin
        failures++;
        $display("FAIL a=%h q=%h", a, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
