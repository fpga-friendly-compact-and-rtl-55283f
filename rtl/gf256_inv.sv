// gf256_inv: multiplicative inverse in the tower field GF(((2^2)^2)^2).
//
// The input is a tower-basis byte g = g1*y^16 + g0*y, where g1 (bits 7:4)
// and g0 (bits 3:0) lie in GF(2^4). The same norm method as one level down
// gives
//   N(g)   = g1*g0*tau^2 + (g1+g0)^2*nu       (an element of GF(2^4))
//   inv(g) = {g0*N^-1, g1*N^-1}
// where tau = y + y^16 and nu = y * y^16 for the basis element y (sbox_pkg).
// The datapath is six GF(2^4) multipliers (three general products, one
// squaring, two scalings by a constant) and one GF(2^4) inverter. Zero maps to zero, as the
// S-box definition requires (0^-1 := 0).
// The source specifies the field, the bases and that the inverse is taken
// here; the choice of this normal-basis structure is this implementation's.
//
// Interface: a -> q, purely combinational.
module gf256_inv (
  input  logic [7:0] a,
  output logic [7:0] q
);
  import sbox_pkg::*;

  logic [3:0] prod, prod_scaled, sum, sum_sq, sum_sq_scaled, norm, norm_inv;
  logic [3:0] q_hi, q_lo;

  assign sum  = a[7:4] ^ a[3:0];
  assign norm = prod_scaled ^ sum_sq_scaled;

  gf16_mul u_prod      (.a(a[7:4]), .b(a[3:0]),       .p(prod));
  gf16_mul u_prod_tau2 (.a(prod),   .b(GF256_TAU_SQ), .p(prod_scaled));
  gf16_mul u_sum_sq    (.a(sum),    .b(sum),          .p(sum_sq));
  gf16_mul u_sum_nu    (.a(sum_sq), .b(GF256_NU),     .p(sum_sq_scaled));
  gf16_inv u_norm_inv  (.a(norm),   .q(norm_inv));
  gf16_mul u_out_hi    (.a(a[3:0]), .b(norm_inv),     .p(q_hi));
  gf16_mul u_out_lo    (.a(a[7:4]), .b(norm_inv),     .p(q_lo));

  assign q = {q_hi, q_lo};
endmodule
