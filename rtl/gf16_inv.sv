// gf16_inv: multiplicative inverse in GF((2^2)^2) with the normal basis {z^4, z}.
//
// For a = a1*z^4 + a0*z the inverse is a^4 / N(a). Here a^4 = a0*z^4 + a1*z,
// which just swaps the halves. The norm N(a) = a * a^4 lies in GF(2^2):
//   N(a) = a1*a0*tau^2 + (a1+a0)^2*nu
// Its GF(2^2) inverse is its square, a swap of its two bits. So
//   inv(a) = {a0*N^-1, a1*N^-1}
// and zero maps to zero. tau^2 and nu come from sbox_pkg. This is the
// standard normal-basis inverter (Canright-style) and is this
// implementation's choice; the source gives only the field and basis.
//
// Interface: a -> q, purely combinational.
module gf16_inv (
  input  logic [3:0] a,
  output logic [3:0] q
);
  import sbox_pkg::*;

  logic [1:0] norm, norm_inv;

  always_comb begin
    norm     = gf4_mul(gf4_mul(a[3:2], a[1:0]), GF16_TAU_SQ)
             ^ gf4_mul(gf4_sq(a[3:2] ^ a[1:0]), GF16_NU);
    norm_inv = gf4_sq(norm);
    q        = {gf4_mul(a[1:0], norm_inv), gf4_mul(a[3:2], norm_inv)};
  end
endmodule
