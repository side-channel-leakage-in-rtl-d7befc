// gf16_mul: multiplier in GF(2^4) = GF(2^2)[y]/(y^2+y+PHI), PHI = z.
//
// With a = a1 y + a0, b = b1 y + b0 and y^2 = y + PHI:
//   a*b = (a1 b1 + a1 b0 + a0 b1) y + (PHI a1 b1 + a0 b0),
// built from four GF(2^2) multipliers.  Combinational.  The tower
// construction is this design's choice for the multipliers of the S-box.
module gf16_mul
  import gf_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t q
);
  gf4_t hh, hl, lh, ll;

  gf4_mul u_hh (.a(a[3:2]), .b(b[3:2]), .q(hh));
  gf4_mul u_hl (.a(a[3:2]), .b(b[1:0]), .q(hl));
  gf4_mul u_lh (.a(a[1:0]), .b(b[3:2]), .q(lh));
  gf4_mul u_ll (.a(a[1:0]), .b(b[1:0]), .q(ll));

  always_comb q = {hh ^ hl ^ lh, gf4_mul_phi(hh) ^ ll};
endmodule
