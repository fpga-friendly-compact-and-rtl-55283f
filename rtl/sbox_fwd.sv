// sbox_fwd: the compact AES-like 8x8 S-box, S(a) = M * a^-1 xor 0x09.
//
// a^-1 is the multiplicative inverse in GF(2^8) modulo 0x1f5 (0^-1 := 0), and
// M is the bit matrix 0x45. The byte passes through three combinational
// stages:
//   1. convert to the tower field GF(((2^2)^2)^2) by multiplying by X^-1;
//   2. invert there (gf256_inv);
//   3. multiply by the merged matrix M*X. This converts back to the
//      polynomial basis and applies the affine matrix in one step. The
//      constant c is then added.
// The stage order, the field, M, c and the basis (y, z, w) = (0x13, 0x7a,
// 0x5d) follow the published S-box. The matrices are derived from them in
// sbox_pkg, and the result reproduces the published S-box table.
//
// Interface: a -> s, purely combinational, no clock or latency.
module sbox_fwd (
  input  logic [7:0] a,
  output logic [7:0] s
);
  import sbox_pkg::*;

  logic [7:0] tower_in, tower_inv, lin_out;

  gf2_matrix8 #(.MATRIX(X_INV)) u_to_tower   (.in(a),         .out(tower_in));
  gf256_inv                     u_inverse    (.a(tower_in),   .q(tower_inv));
  gf2_matrix8 #(.MATRIX(MX))    u_back_affine(.in(tower_inv), .out(lin_out));

  assign s = lin_out ^ AFFINE_C;
endmodule
