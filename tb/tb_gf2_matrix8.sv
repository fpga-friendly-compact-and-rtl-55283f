// tb_gf2_matrix8: checks the four bit-matrix multipliers the S-box uses.
//   * X applied to each unit vector must give the published basis columns
//     chi_0..chi_7.
//   * X^-1 must undo X for all 256 bytes.
//   * M*X must agree with the published product matrix, and with the
//     published M applied after X, for all 256 bytes.
//   * (M*X)^-1 must undo M*X for all 256 bytes.
module tb_gf2_matrix8;
  import tb_gf_ref_pkg::*;

  localparam logic [7:0] M_ROWS [8] = '{8'b01000101, 8'b10001010, 8'b00010101, 8'b00101010,
                                       8'b01010100, 8'b10101000, 8'b01010001, 8'b10100010};
  localparam logic [7:0] MX_ROWS [8] = '{8'b00001110, 8'b10000001, 8'b01001010, 8'b10001110,
                                        8'b10100011, 8'b01001101, 8'b01000000, 8'b00010001};

  logic [7:0] v, x_out, xinv_out, mx_out, mxinv_out;
  int checks = 0, failures = 0;

  gf2_matrix8 #(.MATRIX(sbox_pkg::X_MAP))  u_x     (.in(v),      .out(x_out));
  gf2_matrix8 #(.MATRIX(sbox_pkg::X_INV))  u_xinv  (.in(x_out),  .out(xinv_out));
  gf2_matrix8 #(.MATRIX(sbox_pkg::MX))     u_mx    (.in(v),      .out(mx_out));
  gf2_matrix8 #(.MATRIX(sbox_pkg::MX_INV)) u_mxinv (.in(mx_out), .out(mxinv_out));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s v=%h x=%h xinv=%h mx=%h mxinv=%h", what, v, x_out, xinv_out, mx_out, mxinv_out);
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
    for (int j = 0; j < 8; j++) begin
      v = 8'h80 >> j;
      #1;
      check(x_out == REF_CHI[j], "X column");
    end
    for (int i = 0; i < 256; i++) begin
      v = 8'(i);
      #1;
      check(xinv_out == v, "X^-1 * X");
      check(mx_out == ref_matvec(MX_ROWS, v), "M*X published");
      check(mx_out == ref_matvec(M_ROWS, x_out), "M after X");
      check(mxinv_out == v, "(M*X)^-1 * M*X");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
