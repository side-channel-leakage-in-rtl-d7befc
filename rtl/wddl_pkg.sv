// wddl_pkg: dual-rail types and gate functions for Wave Dynamic Differential
// Logic (WDDL), and the linear field maps of gf_pkg rewritten on dual rails.
//
// A dual-rail bit carries a value v as {t, f} = {v, ~v} in the evaluation
// phase and as {0, 0} in the pre-charge phase.  Only positive (monotone)
// gates are used:
//   AND: t = a.t & b.t,  f = a.f | b.f      OR: the dual
//   NOT: swap the rails (no inverter)
//   XOR: t = a.t & b.f | a.f & b.t,  f = a.t & b.t | a.f & b.f
// so a pre-charge {0,0} on every input propagates to every output, and in
// evaluation each rail makes at most one 0->1 transition: one rail of every
// pair switches per cycle whatever the data, and no gate can glitch.
// Constants are avoided: XOR with a constant 1 is a rail swap, with 0 a wire.
// The gate set is the standard WDDL one named by the document; how the
// masked S-box is expressed in it is this design's own.
package wddl_pkg;

  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  typedef dr_t [1:0] dr4_t;    // GF(2^2) element on dual rails
  typedef dr_t [3:0] dr16_t;   // GF(2^4)
  typedef dr_t [7:0] dr256_t;  // byte

  function automatic dr_t dr_and(dr_t a, dr_t b);
    return '{t: a.t & b.t, f: a.f | b.f};
  endfunction

  function automatic dr_t dr_or(dr_t a, dr_t b);
    return '{t: a.t | b.t, f: a.f & b.f};
  endfunction

  function automatic dr_t dr_not(dr_t a);
    return '{t: a.f, f: a.t};
  endfunction

  function automatic dr_t dr_xor(dr_t a, dr_t b);
    return '{t: (a.t & b.f) | (a.f & b.t), f: (a.t & b.t) | (a.f & b.f)};
  endfunction

  function automatic dr4_t dr4_xor(dr4_t a, dr4_t b);
    dr4_t r;
    for (int i = 0; i < 2; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  function automatic dr16_t dr16_xor(dr16_t a, dr16_t b);
    dr16_t r;
    for (int i = 0; i < 4; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  function automatic dr256_t dr256_xor(dr256_t a, dr256_t b);
    dr256_t r;
    for (int i = 0; i < 8; i++) r[i] = dr_xor(a[i], b[i]);
    return r;
  endfunction

  // XOR with a constant byte: rail swap where the constant bit is 1.
  function automatic dr256_t dr256_xor_const(dr256_t a, logic [7:0] c);
    dr256_t r;
    for (int i = 0; i < 8; i++) r[i] = c[i] ? dr_not(a[i]) : a[i];
    return r;
  endfunction

  // Encode a single-rail vector: {v, ~v} when eval, {0, 0} otherwise.
  function automatic dr256_t dr_encode8(logic [7:0] v, logic eval);
    dr256_t r;
    for (int i = 0; i < 8; i++) r[i] = '{t: v[i] & eval, f: ~v[i] & eval};
    return r;
  endfunction

  function automatic dr16_t dr_encode4(logic [3:0] v, logic eval);
    dr16_t r;
    for (int i = 0; i < 4; i++) r[i] = '{t: v[i] & eval, f: ~v[i] & eval};
    return r;
  endfunction

  // Linear GF(2^2) / GF(2^4) maps, same equations as in gf_pkg.
  function automatic dr4_t dr_gf4_sq(dr4_t g);
    return {g[1], dr_xor(g[1], g[0])};
  endfunction

  function automatic dr4_t dr_gf4_mul_phi(dr4_t g);
    return {dr_xor(g[1], g[0]), g[1]};
  endfunction

  function automatic dr4_t dr_gf4_mul_z1(dr4_t g);
    return {g[0], dr_xor(g[1], g[0])};
  endfunction

  function automatic dr16_t dr_gf16_sq(dr16_t g);
    dr4_t h2 = dr_gf4_sq(g[3:2]);
    return {h2, dr4_xor(dr_gf4_mul_phi(h2), dr_gf4_sq(g[1:0]))};
  endfunction

  function automatic dr16_t dr_gf16_mul_lambda(dr16_t g);
    return {dr_gf4_mul_z1(dr4_xor(g[3:2], g[1:0])), g[3:2]};
  endfunction

  // 8x8 GF(2) matrix by rows; every row is non-zero, so each output is an
  // XOR tree over the selected inputs with no constant.
  function automatic dr256_t dr_mat8(dr256_t x, logic [7:0] rows [8]);
    dr256_t r;
    for (int j = 0; j < 8; j++) begin
      logic first = 1'b1;
      r[j] = x[0];
      for (int i = 0; i < 8; i++) begin
        if (rows[j][i]) begin
          r[j]  = first ? x[i] : dr_xor(r[j], x[i]);
          first = 1'b0;
        end
      end
    end
    return r;
  endfunction

  function automatic dr256_t dr_to_tower(dr256_t x);
    return dr_mat8(x, gf_pkg::TO_TOWER_ROW);
  endfunction

  function automatic dr256_t dr_from_tower(dr256_t x);
    return dr_mat8(x, gf_pkg::FROM_TOWER_ROW);
  endfunction

  function automatic dr256_t dr_affine_lin(dr256_t x);
    dr256_t r;
    for (int i = 0; i < 8; i++)
      r[i] = dr_xor(dr_xor(dr_xor(x[i], x[(i+7)%8]), dr_xor(x[(i+6)%8], x[(i+5)%8])), x[(i+4)%8]);
    return r;
  endfunction

endpackage
