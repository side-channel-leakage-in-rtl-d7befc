// wddl_gf16_mul: GF(2^4) multiplier in WDDL dual-rail logic, combinational.
// Same tower equations as gf16_mul: a*b = (a1b1 + a1b0 + a0b1) y +
// (PHI a1b1 + a0b0), from four dual-rail GF(2^2) multipliers.
module wddl_gf16_mul
  import wddl_pkg::*;
(
  input  dr16_t a,
  input  dr16_t b,
  output dr16_t q
);
  dr4_t hh, hl, lh, ll;

  wddl_gf4_mul u_hh (.a(a[3:2]), .b(b[3:2]), .q(hh));
  wddl_gf4_mul u_hl (.a(a[3:2]), .b(b[1:0]), .q(hl));
  wddl_gf4_mul u_lh (.a(a[1:0]), .b(b[3:2]), .q(lh));
  wddl_gf4_mul u_ll (.a(a[1:0]), .b(b[1:0]), .q(ll));

  always_comb q = {dr4_xor(dr4_xor(hh, hl), lh), dr4_xor(dr_gf4_mul_phi(hh), ll)};
endmodule
