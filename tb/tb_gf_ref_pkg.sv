// tb_gf_ref_pkg: reference arithmetic for the S-box testbenches.
//
// Works directly in the polynomial basis of GF(2^8) modulo 0x1f5, written
// independently of the design's own helpers. Tower-field values from the
// design are mapped back into this basis through the published basis
// generators z = 0x7a and w = 0x5d and the published columns of the
// conversion map X (chi_0..chi_7 = f4 ec 54 a2 d2 c7 2e d4). The field
// results can then be compared with plain polynomial arithmetic.
package tb_gf_ref_pkg;

  localparam logic [7:0] REF_Z = 8'h7A;
  localparam logic [7:0] REF_W = 8'h5D;
  localparam logic [7:0] REF_CHI [8] = '{8'hF4, 8'hEC, 8'h54, 8'hA2, 8'hD2, 8'hC7, 8'h2E, 8'hD4};

  // Carry-less product followed by reduction of the 15-bit result.
  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h1F5) << (i - 8);
    return p[7:0];
  endfunction

  // Inverse by exhaustive search; 0 maps to 0.
  function automatic logic [7:0] ref_inv(logic [7:0] a);
    logic [7:0] r;
    r = '0;
    for (int b = 1; b < 256; b++) if (ref_mul(a, 8'(b)) == 8'h01) r = 8'(b);
    return r;
  endfunction

  function automatic logic [7:0] ref_sq(logic [7:0] a);
    return ref_mul(a, a);
  endfunction

  function automatic logic [7:0] emb4(logic [1:0] v);
    return (v[1] ? ref_sq(REF_W) : 8'h00) ^ (v[0] ? REF_W : 8'h00);
  endfunction

  function automatic logic [7:0] emb16(logic [3:0] v);
    logic [7:0] z4;
    z4 = ref_sq(ref_sq(REF_Z));
    return ref_mul(emb4(v[3:2]), z4) ^ ref_mul(emb4(v[1:0]), REF_Z);
  endfunction

  function automatic logic [7:0] emb256(logic [7:0] v);
    logic [7:0] r;
    r = '0;
    for (int j = 0; j < 8; j++) if (v[7-j]) r ^= REF_CHI[j];
    return r;
  endfunction

  // Matrix rows written top row first; row r gives output bit 7-r.
  function automatic logic [7:0] ref_matvec(logic [7:0] rows [8], logic [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[7-i] = ^(rows[i] & v);
    return r;
  endfunction

endpackage
