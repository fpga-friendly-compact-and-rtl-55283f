// gf2_matrix8: multiplies a byte by a constant 8x8 bit matrix over GF(2).
//
// The S-box uses this for its linear steps: converting a polynomial-basis
// byte into the tower basis (X^-1), and the merged step that converts back
// and applies the affine matrix (M*X). The inverse S-box uses the two
// inverse matrices. Output bit k is the parity of MATRIX[k] ANDed with the
// input, so each output bit is a small XOR tree (see sbox_pkg for the row
// convention).
//
// Interface: in -> out, purely combinational, no clock.
// The matrix values follow the published S-box parameters. The default
// (X^-1) exists only so the module can stand alone.
module gf2_matrix8 #(
  parameter sbox_pkg::mat8_t MATRIX = sbox_pkg::X_INV
) (
  input  logic [7:0] in,
  output logic [7:0] out
);
  always_comb out = sbox_pkg::mat_vec(MATRIX, in);
endmodule
