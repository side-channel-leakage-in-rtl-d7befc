// wddl_gf4_mul: GF(2^2) multiplier in WDDL dual-rail logic, combinational.
//
// The same equations as gf4_mul, q = (a1b1 + a1b0 + a0b1) z + (a1b1 + a0b0),
// built from the dual-rail AND and XOR gates of wddl_pkg, so pre-charged
// inputs give pre-charged outputs and every output pair evaluates to
// complementary rails with at most one rising transition per rail.
module wddl_gf4_mul
  import wddl_pkg::*;
(
  input  dr4_t a,
  input  dr4_t b,
  output dr4_t q
);
  dr_t hh, hl, lh, ll;

  always_comb begin
    hh = dr_and(a[1], b[1]);
    hl = dr_and(a[1], b[0]);
    lh = dr_and(a[0], b[1]);
    ll = dr_and(a[0], b[0]);
    q  = {dr_xor(dr_xor(hh, hl), lh), dr_xor(hh, ll)};
  end
endmodule
