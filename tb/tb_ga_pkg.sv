// tb_ga_pkg: reference 5D geometric algebra for the testbenches, computed in
// double precision on full 32-coefficient multivectors.
//
// Blades are 5-bit masks (bit i-1 = e_i, e5 squares to -1). The product of
// two blades is built by right-multiplying with one basis vector at a time,
// and the outer product and contractions are taken by grade selection, so
// the reference does not share the design's shortcuts.
package tb_ga_pkg;

  typedef real mv_t [32];

  // blade mask of coefficient k of a quadruple of type t
  function automatic int qblade(int t, int k);
    int r;
    r = 0;
    if (t & 1) r ^= 5'b00001;
    if (t & 2) r ^= 5'b00100;
    if (t & 4) r ^= 5'b10000;
    if (k & 1) r ^= 5'b00011;
    if (k & 2) r ^= 5'b01100;
    return r;
  endfunction

  function automatic int popc(int x);
    int n;
    n = 0;
    for (int i = 0; i < 5; i++) if (x & (1 << i)) n++;
    return n;
  endfunction

  // blade a times blade b: returns the mask, sets sgn to +1 or -1
  function automatic int blade_mul(int a, int b, output real sgn);
    int cur;
    sgn = 1.0;
    cur = a;
    for (int j = 0; j < 5; j++) begin
      if (b & (1 << j)) begin
        // move e_j left past every higher index already in cur
        for (int i = j + 1; i < 5; i++) if (cur & (1 << i)) sgn = -sgn;
        if (cur & (1 << j)) begin
          if (j == 4) sgn = -sgn;
          cur &= ~(1 << j);
        end else begin
          cur |= (1 << j);
        end
      end
    end
    return cur;
  endfunction

  // kind: 0 geometric, 1 outer, 2 left contraction, 3 right contraction
  function automatic mv_t mv_prod(mv_t x, mv_t y, int kind);
    mv_t r;
    real sgn;
    int  m, gr;
    foreach (r[i]) r[i] = 0.0;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        if (x[a] == 0.0 || y[b] == 0.0) continue;
        m  = blade_mul(a, b, sgn);
        gr = popc(m);
        if (kind == 1 && gr != popc(a) + popc(b)) continue;
        if (kind == 2 && gr != popc(b) - popc(a)) continue;
        if (kind == 3 && gr != popc(a) - popc(b)) continue;
        r[m] += sgn * x[a] * y[b];
      end
    return r;
  endfunction

endpackage
