// sbox_inv: inverse of the compact 8x8 S-box, S^-1(s) = (M^-1 * (s xor 0x09))^-1.
//
// The published inverse S-box is defined only as a table. This module
// computes it with the forward datapath run backwards, sharing the same
// tower-field inverter:
//   1. remove the constant: t = s xor 0x09;
//   2. multiply by (M*X)^-1 = X^-1 * M^-1. This undoes the affine matrix
//      and lands directly in the tower basis;
//   3. invert in GF(((2^2)^2)^2) (gf256_inv);
//   4. convert back to the polynomial basis by multiplying by X.
// The structure is this implementation's choice. The result reproduces the
// published inverse table.
//
// Interface: s -> a, purely combinational, no clock or latency.
module sbox_inv (
  input  logic [7:0] s,
  output logic [7:0] a
);
  import sbox_pkg::*;

  logic [7:0] tower_in, tower_inv;

  gf2_matrix8 #(.MATRIX(MX_INV)) u_undo_affine(.in(s ^ AFFINE_C), .out(tower_in));
  gf256_inv                      u_inverse    (.a(tower_in),      .q(tower_inv));
  gf2_matrix8 #(.MATRIX(X_MAP))  u_to_poly    (.in(tower_inv),    .out(a));
endmodule
