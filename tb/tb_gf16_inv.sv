// tb_gf16_inv: exhaustive check of the GF((2^2)^2) inverter. Each result is
// mapped into GF(2^8) and compared with the inverse found by search there
// (zero must map to zero).
module tb_gf16_inv;
  import tb_gf_ref_pkg::*;

  logic [3:0] a, q;
  int checks = 0, failures = 0;

  gf16_inv dut (.a(a), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      checks++;
      if (emb16(q) != ref_inv(emb16(a))) begin
        failures++;
        $display("FAIL a=%h q=%h", a, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
