// tb_sbox_fwd: compares the S-box with its published 256-entry table for
// every input, checks the worked example S(0x7a) = 0xe5, and checks that
// the outputs form a permutation.
module tb_sbox_fwd;
  logic [7:0] expected [256];
  logic [7:0] a, s;
  logic       seen [256];
  int checks = 0, failures = 0;

  sbox_fwd dut (.a(a), .s(s));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h s=%h", what, a, s);
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
    $readmemh("tb/sbox_fwd_table.hex", expected);
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(s == expected[i], "table");
      check(!seen[s], "permutation");
      seen[s] = 1'b1;
    end
    a = 8'h7A;
    #1;
    check(s == 8'hE5, "example 0x7a");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
