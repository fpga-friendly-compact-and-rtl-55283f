// sbox_pkg: constants and field helpers shared by the compact 8x8 S-box.
//
// The S-box is S(a) = M * a^-1 xor c, where a^-1 is the multiplicative
// inverse in GF(2^8) built on the primitive polynomial
// x^8+x^7+x^6+x^5+x^4+x^2+1 (0x1f5), M is the 8x8 bit matrix 0x45 and c = 0x09.
// The inverse is not computed in the polynomial basis. Instead the byte is
// moved into the tower field GF(((2^2)^2)^2), where each level uses a normal
// basis: {w^2, w} over GF(2), {z^4, z} over GF(2^2) and {y^16, y} over GF(2^4).
// The basis generators are (y, z, w) = (0x13, 0x7a, 0x5d), given as
// polynomial-basis bytes modulo 0x1f5.
//
// Everything else here is derived from those numbers while the design
// elaborates, so no derived table is pasted into the source:
//   * the conversion map X. Its column j is the tower basis element chi_j,
//     the product of w^2 or w, z^4 or z, and y^16 or y, in that bit order.
//   * its GF(2) inverse X^-1, which converts into the tower basis.
//   * the merged output matrix M*X and its inverse (M*X)^-1.
//   * the trace and norm constants that the normal-basis multipliers and
//     inverters need at the GF(2^4) and GF(2^8) levels.
// The polynomial, M, c and (y, z, w) are the published parameters of the
// S-box. Deriving the remaining constants here is this implementation's
// choice.
//
// Bit convention for a tower element: bit 7 is the coefficient of
// w^2 z^4 y^16 and bit 0 the coefficient of w z y. In every sub-field the
// upper half holds the coefficient of the "conjugate" basis element
// (y^16, z^4, w^2) and the lower half the coefficient of (y, z, w).
//
// Matrix convention (mat8_t): m[k] is the row that drives output bit k and
// bit i of a row multiplies input bit i. A matrix written as a concatenation
// of rows, top row first, therefore reads exactly as it is usually printed:
// the top row drives output bit 7 and its leftmost bit multiplies input
// bit 7.
package sbox_pkg;

  typedef logic [7:0][7:0] mat8_t;

  // Published parameters of the S-box.
  localparam logic [8:0] FIELD_POLY = 9'h1F5;
  localparam logic [7:0] BASIS_Y    = 8'h13;
  localparam logic [7:0] BASIS_Z    = 8'h7A;
  localparam logic [7:0] BASIS_W    = 8'h5D;
  localparam logic [7:0] AFFINE_C   = 8'h09;
  localparam mat8_t      AFFINE_M   = {8'b0100_0101, 8'b1000_1010, 8'b0001_0101, 8'b0010_1010,
                                       8'b0101_0100, 8'b1010_1000, 8'b0101_0001, 8'b1010_0010};

  // ---------------------------------------------------------------------
  // GF(2) matrix helpers. m[k] is the row that produces output bit k, and
  // bit i of a row multiplies input bit i.
  // ---------------------------------------------------------------------
  function automatic logic [7:0] mat_vec(mat8_t m, logic [7:0] v);
    logic [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = ^(m[k] & v);
    return r;
  endfunction

  function automatic mat8_t mat_mul(mat8_t a, mat8_t b);
    mat8_t r;
    for (int k = 0; k < 8; k++)
      for (int c = 0; c < 8; c++) begin
        logic acc;
        acc = 1'b0;
        for (int i = 0; i < 8; i++) acc ^= a[k][i] & b[i][c];
        r[k][c] = acc;
      end
    return r;
  endfunction

  // Gauss-Jordan elimination over GF(2). Only used on invertible matrices.
  function automatic mat8_t mat_inv(mat8_t m);
    mat8_t a, r;
    for (int i = 0; i < 8; i++) r[i] = 8'h01 << i;
    a = m;
    for (int col = 0; col < 8; col++) begin
      int piv;
      piv = col;
      for (int row = 7; row >= col; row--) if (a[row][col]) piv = row;
      if (piv != col) begin
        logic [7:0] t;
        t = a[col]; a[col] = a[piv]; a[piv] = t;
        t = r[col]; r[col] = r[piv]; r[piv] = t;
      end
      for (int row = 0; row < 8; row++)
        if (row != col && a[row][col]) begin
          a[row] ^= a[col];
          r[row] ^= r[col];
        end
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Polynomial-basis GF(2^8) arithmetic, used only to derive constants.
  // ---------------------------------------------------------------------
  function automatic logic [7:0] poly_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = t[7] ? ((t << 1) ^ FIELD_POLY[7:0]) : (t << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] poly_pow(logic [7:0] a, int n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < n; i++) r = poly_mul(r, a);
    return r;
  endfunction

  // Tower basis element chi_j (j = 0 is bit 7 of a tower byte).
  function automatic logic [7:0] tower_basis(int j);
    logic [7:0] fw, fz, fy;
    fw = (j % 2 == 0)       ? poly_pow(BASIS_W, 2)  : BASIS_W;
    fz = ((j / 2) % 2 == 0) ? poly_pow(BASIS_Z, 4)  : BASIS_Z;
    fy = (j < 4)            ? poly_pow(BASIS_Y, 16) : BASIS_Y;
    return poly_mul(poly_mul(fw, fz), fy);
  endfunction

  // Conversion map X: tower coordinates -> polynomial basis.
  function automatic mat8_t build_x();
    mat8_t r;
    for (int j = 0; j < 8; j++) begin
      logic [7:0] col;
      col = tower_basis(j);
      for (int k = 0; k < 8; k++) r[k][7-j] = col[k];
    end
    return r;
  endfunction

  // Polynomial-basis value of a GF(2^2) element {w^2, w}.
  function automatic logic [7:0] embed4(logic [1:0] v);
    return (v[1] ? poly_pow(BASIS_W, 2) : 8'h00) ^ (v[0] ? BASIS_W : 8'h00);
  endfunction

  // Polynomial-basis value of a GF(2^4) element {z^4, z} over GF(2^2).
  function automatic logic [7:0] embed16(logic [3:0] v);
    return poly_mul(embed4(v[3:2]), poly_pow(BASIS_Z, 4)) ^ poly_mul(embed4(v[1:0]), BASIS_Z);
  endfunction

  function automatic logic [1:0] coords4(logic [7:0] e);
    logic [1:0] r;
    r = '0;
    for (int v = 0; v < 4; v++) if (embed4(2'(v)) == e) r = 2'(v);
    return r;
  endfunction

  function automatic logic [3:0] coords16(logic [7:0] e);
    logic [3:0] r;
    r = '0;
    for (int v = 0; v < 16; v++) if (embed16(4'(v)) == e) r = 4'(v);
    return r;
  endfunction

  // Derived matrices.
  localparam mat8_t X_MAP  = build_x();
  localparam mat8_t X_INV  = mat_inv(X_MAP);
  localparam mat8_t MX     = mat_mul(AFFINE_M, X_MAP);
  localparam mat8_t MX_INV = mat_inv(MX);

  // Derived tower constants. For a normal basis {Y^q, Y} with
  // Y^2 + tau*Y + nu = 0, tau = Y + Y^q and nu = Y * Y^q.
  localparam logic [7:0] Z4_POLY    = poly_pow(BASIS_Z, 4);
  localparam logic [7:0] Y16_POLY   = poly_pow(BASIS_Y, 16);
  localparam logic [7:0] TAU_Z_POLY = BASIS_Z ^ Z4_POLY;
  localparam logic [7:0] NU_Z_POLY  = poly_mul(BASIS_Z, Z4_POLY);
  localparam logic [7:0] TAU_Y_POLY = BASIS_Y ^ Y16_POLY;
  localparam logic [7:0] NU_Y_POLY  = poly_mul(BASIS_Y, Y16_POLY);

  localparam logic [1:0] GF16_TAU        = coords4(TAU_Z_POLY);
  localparam logic [1:0] GF16_TAU_SQ     = coords4(poly_mul(TAU_Z_POLY, TAU_Z_POLY));
  localparam logic [1:0] GF16_NU         = coords4(NU_Z_POLY);
  localparam logic [1:0] GF16_NU_DIV_TAU = coords4(poly_mul(NU_Z_POLY, poly_pow(TAU_Z_POLY, 254)));
  localparam logic [3:0] GF256_TAU_SQ    = coords16(poly_mul(TAU_Y_POLY, TAU_Y_POLY));
  localparam logic [3:0] GF256_NU        = coords16(NU_Y_POLY);

  // ---------------------------------------------------------------------
  // GF(2^2) in the normal basis {w^2, w}, w^2 + w + 1 = 0 (tau = nu = 1).
  // ---------------------------------------------------------------------
  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {(a[1] & b[1]) ^ e, (a[0] & b[0]) ^ e};
  endfunction

  // Squaring in a normal basis swaps the two coordinates; in GF(2^2) the
  // square of a nonzero element is also its inverse.
  function automatic logic [1:0] gf4_sq(logic [1:0] a);
    return {a[0], a[1]};
  endfunction

endpackage
