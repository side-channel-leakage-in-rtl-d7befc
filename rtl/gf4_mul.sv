// gf4_mul: multiplier in GF(2^2) = GF(2)[z]/(z^2+z+1), purely combinational.
//
// It is the unit that the masked multiplier instantiates four times.  With
// a = a1 z + a0 and b = b1 z + b0 the product is
//   (a1 b1 + a1 b0 + a0 b1) z + (a1 b1 + a0 b0),
// four AND terms and three XORs.  The field polynomial and basis are this
// design's choice; the document only names the unit.
module gf4_mul
  import gf_pkg::*;
(
  input  gf4_t a,
  input  gf4_t b,
  output gf4_t q
);
  logic hh, hl, lh, ll;

  always_comb begin
    hh = a[1] & b[1];
    hl = a[1] & b[0];
    lh = a[0] & b[1];
    ll = a[0] & b[0];
    q  = {hh ^ hl ^ lh, hh ^ ll};
  end
endmodule
