// tb_sbox_properties: measures the cryptographic properties of the S-box
// hardware and compares them with the published security table.
//
// The forward and inverse S-box modules are swept over all 256 inputs, and
// the captured tables are then analysed. For each of the two S-boxes the
// test checks:
//   differential uniformity 4 (max DDT entry over nonzero input difference)
//   linearity 32, i.e. max |Walsh coefficient|, so max linear bias 16 and
//     nonlinearity 128 - 32/2 = 112
//   boomerang uniformity 6 (max BCT entry off the first row and column)
//   differential branch number 2 and linear branch number 2
//   minimal and maximal algebraic degree of the component functions = 7
//   bijective (so every component is balanced), no fixed points, not an
//     involution, no linear structure in any component
// Two derived facts, whether the S-box is APN and whether it is bent, are
// printed too.
module tb_sbox_properties;
  logic [7:0] a_in, s_out, s_in, a_out;
  logic [7:0] fwd [256];
  logic [7:0] inv [256];
  int checks = 0, failures = 0;

  sbox_fwd u_fwd (.a(a_in), .s(s_out));
  sbox_inv u_inv (.s(s_in), .a(a_out));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int popcount8(logic [7:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int diff_uniformity(const ref logic [7:0] t [256]);
    int best, cnt [256];
    best = 0;
    for (int d = 1; d < 256; d++) begin
      for (int k = 0; k < 256; k++) cnt[k] = 0;
      for (int x = 0; x < 256; x++) cnt[t[x] ^ t[x ^ d]]++;
      for (int k = 0; k < 256; k++) if (cnt[k] > best) best = cnt[k];
    end
    return best;
  endfunction

  // Max |W(a,b)| over b != 0, with W the Walsh spectrum of component b.S.
  // Also returns the linear branch number.
  function automatic int linearity(const ref logic [7:0] t [256], output int lin_branch);
    int best, w [256];
    best = 0;
    lin_branch = 99;
    for (int b = 1; b < 256; b++) begin
      for (int x = 0; x < 256; x++) w[x] = (popcount8(8'(b) & t[x]) % 2 == 1) ? -1 : 1;
      for (int h = 1; h < 256; h = h * 2)
        for (int i = 0; i < 256; i += 2 * h)
          for (int j = i; j < i + h; j++) begin
            int u, v;
            u = w[j];
            v = w[j + h];
            w[j]     = u + v;
            w[j + h] = u - v;
          end
      for (int a = 0; a < 256; a++) begin
        int mag;
        mag = (w[a] < 0) ? -w[a] : w[a];
        if (mag > best) best = mag;
        if (w[a] != 0 && popcount8(8'(a)) + popcount8(8'(b)) < lin_branch)
          lin_branch = popcount8(8'(a)) + popcount8(8'(b));
      end
    end
    return best;
  endfunction

  function automatic int boomerang_uniformity(const ref logic [7:0] t [256], const ref logic [7:0] ti [256]);
    int best;
    best = 0;
    for (int i = 1; i < 256; i++)
      for (int j = 1; j < 256; j++) begin
        int cnt;
        cnt = 0;
        for (int x = 0; x < 256; x++)
          if ((ti[t[x] ^ 8'(j)] ^ ti[t[x ^ i] ^ 8'(j)]) == 8'(i)) cnt++;
        if (cnt > best) best = cnt;
      end
    return best;
  endfunction

  function automatic int diff_branch(const ref logic [7:0] t [256]);
    int best;
    best = 99;
    for (int x = 0; x < 256; x++)
      for (int y = x + 1; y < 256; y++) begin
        int wsum;
        wsum = popcount8(8'(x ^ y)) + popcount8(t[x] ^ t[y]);
        if (wsum < best) best = wsum;
      end
    return best;
  endfunction

  // Algebraic degree of every nonzero component, via the binary Moebius
  // transform; returns min and max over the components.
  task automatic degrees(const ref logic [7:0] t [256], output int dmin, output int dmax);
    logic anf [256];
    dmin = 99;
    dmax = 0;
    for (int b = 1; b < 256; b++) begin
      int deg;
      for (int x = 0; x < 256; x++) anf[x] = ^(8'(b) & t[x]);
      for (int h = 1; h < 256; h = h * 2)
        for (int x = 0; x < 256; x++) if ((x & h) != 0) anf[x] ^= anf[x ^ h];
      deg = 0;
      for (int x = 0; x < 256; x++) if (anf[x] && popcount8(8'(x)) > deg) deg = popcount8(8'(x));
      if (deg < dmin) dmin = deg;
      if (deg > dmax) dmax = deg;
    end
  endtask

  function automatic logic has_linear_structure(const ref logic [7:0] t [256]);
    logic found;
    found = 1'b0;
    for (int b = 1; b < 256 && !found; b++)
      for (int al = 1; al < 256 && !found; al++) begin
        logic first, constant;
        first    = ^(8'(b) & (t[0] ^ t[al]));
        constant = 1'b1;
        for (int x = 1; x < 256 && constant; x++)
          if ((^(8'(b) & (t[x] ^ t[x ^ al]))) != first) constant = 1'b0;
        if (constant) found = 1'b1;
      end
    return found;
  endfunction

  task automatic analyse(input string name, const ref logic [7:0] t [256], const ref logic [7:0] ti [256]);
    int du, lin, lbn, bu, dbn, dmin, dmax;
    logic bij, fixed, invol;
    logic seen [256];
    bij = 1'b1;
    fixed = 1'b0;
    invol = 1'b1;
    for (int x = 0; x < 256; x++) seen[x] = 1'b0;
    for (int x = 0; x < 256; x++) begin
      if (seen[t[x]]) bij = 1'b0;
      seen[t[x]] = 1'b1;
      if (t[x] == 8'(x)) fixed = 1'b1;
      if (t[t[x]] != 8'(x)) invol = 1'b0;
    end
    du  = diff_uniformity(t);
    lin = linearity(t, lbn);
    bu  = boomerang_uniformity(t, ti);
    dbn = diff_branch(t);
    degrees(t, dmin, dmax);
    $display("%s: differential uniformity %0d, linearity %0d (max bias %0d, nonlinearity %0d), boomerang uniformity %0d",
             name, du, lin, lin / 2, 128 - lin / 2, bu);
    $display("%s: differential branch %0d, linear branch %0d, degree min %0d max %0d, bijective %0d, fixed points %0d, involution %0d",
             name, dbn, lbn, dmin, dmax, bij, fixed, invol);
    $display("%s: APN %0d, bent %0d, max differential probability %0d/256",
             name, du == 2, (128 - lin / 2) == 120, du);
    check(du == 4, {name, " differential uniformity 4"});
    check(lin == 32, {name, " linearity 32"});
    check(128 - lin / 2 == 112, {name, " nonlinearity 112"});
    check(bu == 6, {name, " boomerang uniformity 6"});
    check(dbn == 2, {name, " differential branch number 2"});
    check(lbn == 2, {name, " linear branch number 2"});
    check(dmin == 7 && dmax == 7, {name, " algebraic degree 7"});
    check(bij, {name, " permutation / balanced"});
    check(!fixed, {name, " no fixed points"});
    check(!invol, {name, " not an involution"});
    check(!has_linear_structure(t), {name, " no linear structure"});
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      a_in = 8'(x);
      s_in = 8'(x);
      #1;
      fwd[x] = s_out;
      inv[x] = a_out;
    end
    for (int x = 0; x < 256; x++) check(inv[fwd[x]] == 8'(x), "inverse module undoes forward module");
    analyse("S-box", fwd, inv);
    analyse("inverse S-box", inv, fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
