// gf_pkg: types and linear field maps shared by the masked AES S-box.
//
// The S-box inverts in the tower field GF(((2^2)^2)^2):
//   GF(2^2)          = GF(2)[z]   / (z^2 + z + 1),    element {g1,g0} = g1*z + g0
//   GF(2^4)          = GF(2^2)[y] / (y^2 + y + PHI),  PHI    = z       (2'b10)
//   GF(2^8) (tower)  = GF(2^4)[x] / (x^2 + x + LAMBDA), LAMBDA = (z+1)*y (4'b1100)
// The upper half of a vector is always the coefficient of the new variable.
// These field choices are this design's own; the masked multiplier structure
// itself follows the published masked GF(2^2) multiplier.
//
// Everything here is linear over GF(2) (squaring, multiplication by a
// constant, change of basis, the AES affine matrix), so each map can be applied
// to the masked value and to its mask separately.  Only the products need the
// masked multipliers.
package gf_pkg;

  typedef logic [1:0] gf4_t;
  typedef logic [3:0] gf16_t;
  typedef logic [7:0] gf256_t;

  // AES S-box affine constant, added outside the masked core.
  localparam gf256_t SBOX_CONST = 8'h63;

  // Change of basis from the AES field (polynomial t^8+t^4+t^3+t+1) to the
  // tower field.  Column i of the matrix is beta^i, where beta = 8'h42 is a
  // root of the AES polynomial in the tower field; row j below is the set of
  // input bits whose parity gives output bit j.
  localparam gf256_t TO_TOWER_ROW [8] =
    '{8'h71, 8'h96, 8'h90, 8'h14, 8'h70, 8'h0c, 8'hde, 8'ha0};
  // Inverse change of basis (the inverse matrix of the one above).
  localparam gf256_t FROM_TOWER_ROW [8] =
    '{8'h11, 8'hf0, 8'hf6, 8'hd6, 8'hfe, 8'h7a, 8'h94, 8'hfa};

  // Squaring in GF(2^2): (g1 z + g0)^2 = g1 z + (g1 + g0).  Equals inversion.
  function automatic gf4_t gf4_sq(gf4_t g);
    return {g[1], g[1] ^ g[0]};
  endfunction

  // Multiplication by PHI = z in GF(2^2): (g1 z + g0) z = (g1+g0) z + g1.
  function automatic gf4_t gf4_mul_phi(gf4_t g);
    return {g[1] ^ g[0], g[1]};
  endfunction

  // Multiplication by z+1 in GF(2^2): (g1 z + g0)(z+1) = g0 z + (g1+g0).
  function automatic gf4_t gf4_mul_z1(gf4_t g);
    return {g[0], g[1] ^ g[0]};
  endfunction

  // Squaring in GF(2^4): (g1 y + g0)^2 = g1^2 y + (PHI g1^2 + g0^2).
  function automatic gf16_t gf16_sq(gf16_t g);
    gf4_t h2 = gf4_sq(g[3:2]);
    return {h2, gf4_mul_phi(h2) ^ gf4_sq(g[1:0])};
  endfunction

  // Multiplication by LAMBDA = (z+1) y in GF(2^4):
  //   (g1 y + g0)(z+1) y = (z+1)(g1+g0) y + PHI (z+1) g1,  and PHI (z+1) = 1.
  function automatic gf16_t gf16_mul_lambda(gf16_t g);
    return {gf4_mul_z1(g[3:2] ^ g[1:0]), g[3:2]};
  endfunction

  // Apply an 8x8 GF(2) matrix given by its rows.
  function automatic gf256_t mat8(gf256_t x, gf256_t rows [8]);
    gf256_t r;
    for (int j = 0; j < 8; j++) r[j] = ^(x & rows[j]);
    return r;
  endfunction

  function automatic gf256_t to_tower(gf256_t x);
    return mat8(x, TO_TOWER_ROW);
  endfunction

  function automatic gf256_t from_tower(gf256_t x);
    return mat8(x, FROM_TOWER_ROW);
  endfunction

  // Linear part of the AES affine transform: x ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4.
  function automatic gf256_t affine_lin(gf256_t x);
    return x ^ {x[6:0], x[7]} ^ {x[5:0], x[7:6]} ^ {x[4:0], x[7:5]} ^ {x[3:0], x[7:4]};
  endfunction

endpackage
