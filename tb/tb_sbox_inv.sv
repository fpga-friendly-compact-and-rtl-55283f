// tb_sbox_inv: compares the inverse S-box with its published table for every
// input, and checks that it undoes the forward S-box for every byte.
module tb_sbox_inv;
  logic [7:0] expected [256];
  logic [7:0] s, a, fwd_in, fwd_out, back;
  int checks = 0, failures = 0;

  sbox_inv dut     (.s(s),       .a(a));
  sbox_fwd u_fwd   (.a(fwd_in),  .s(fwd_out));
  sbox_inv u_round (.s(fwd_out), .a(back));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s s=%h a=%h fwd_in=%h back=%h", what, s, a, fwd_in, back);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/sbox_inv_table.hex", expected);
    for (int i = 0; i < 256; i++) begin
      s      = 8'(i);
      fwd_in = 8'(i);
      #1;
      check(a == expected[i], "table");
      check(back == fwd_in, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
