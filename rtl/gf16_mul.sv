// gf16_mul: multiplier in GF((2^2)^2) with the normal basis {z^4, z}.
//
// An operand is {a1, a0} = a1*z^4 + a0*z with a1, a0 in GF(2^2) (basis
// {w^2, w}). With tau = z + z^4 and nu = z * z^4, the product is
//   p1 = a1*b1*tau + (a1+a0)*(b1+b0)*nu/tau
//   p0 = a0*b0*tau + (a1+a0)*(b1+b0)*nu/tau
// which takes three GF(2^2) multiplications and two constant scalings.
// tau and nu/tau come from the basis element z chosen for the S-box; see
// sbox_pkg. The multiplier is the usual structure for normal bases and is
// this implementation's choice; the source gives only the field and basis.
//
// Interface: a, b -> p, purely combinational.
module gf16_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  import sbox_pkg::*;

  logic [1:0] shared, hi, lo;

  always_comb begin
    shared = gf4_mul(gf4_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]), GF16_NU_DIV_TAU);
    hi     = gf4_mul(gf4_mul(a[3:2], b[3:2]), GF16_TAU);
    lo     = gf4_mul(gf4_mul(a[1:0], b[1:0]), GF16_TAU);
    p      = {hi ^ shared, lo ^ shared};
  end
endmodule
