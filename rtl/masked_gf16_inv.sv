// masked_gf16_inv: Boolean-masked inversion in GF(2^4), combinational.
//
// Input d_m = d ^ d_mask, output q_m = d^-1 ^ r_out (0 maps to 0).  With
// d = dh y + dl over GF(2^2) the inverse is
//   e = PHI dh^2 + dh dl + dl^2,   d^-1 = (dh e^-1) y + ((dh + dl) e^-1).
// The squares and constant products are linear and act on each share alone.
// The product dh*dl is a masked GF(2^2) multiplier whose output mask is r_e,
// so e leaves masked by me = r_e + PHI mdh^2 + mdl^2 (computed from masks
// only).  Inversion in GF(2^2) is squaring, so e^-1 is masked by me^2.  Two
// more masked multipliers form the output halves with output masks r_out.
//
// Masking rule: every multiplier's output mask must be independent of its
// two input masks, otherwise a partial sum in its XOR chain can cancel to a
// value that depends on the unmasked data.  The caller must therefore supply
// r_e independent of d_mask, and r_out independent of d_mask and r_e (in
// masked_sbox they are pieces of the S-box input mask, which d_mask is
// independent of).  The equations and this mask schedule are this design's
// own construction from the published masked GF(2^2) multiplier.
module masked_gf16_inv
  import gf_pkg::*;
(
  input  gf16_t d_m,     // d ^ d_mask
  input  gf16_t d_mask,
  input  gf4_t  r_e,     // output mask of the dh*dl product
  input  gf16_t r_out,   // mask of the result
  output gf16_t q_m      // d^-1 ^ r_out
);
  gf4_t dh_m, dl_m, mdh, mdl;
  gf4_t me, einv_mask;
  gf4_t prod_m, part_m, e_m, einv_m;
  gf4_t qh_m, ql_m;

  always_comb begin
    dh_m      = d_m[3:2];
    dl_m      = d_m[1:0];
    mdh       = d_mask[3:2];
    mdl       = d_mask[1:0];
    me        = r_e ^ gf4_mul_phi(gf4_sq(mdh)) ^ gf4_sq(mdl);
    einv_mask = gf4_sq(me);
  end

  // The linear terms are added to the masked product one at a time.
  always_comb begin
    part_m = prod_m ^ gf4_mul_phi(gf4_sq(dh_m));
    e_m    = part_m ^ gf4_sq(dl_m);
    einv_m = gf4_sq(e_m);
  end

  always_comb q_m = {qh_m, ql_m};

  masked_gf4_mul u_prod (.a_m(dh_m), .b_m(dl_m), .m_a(mdh), .m_b(mdl),
                         .m_q(r_e), .q_m(prod_m));
  masked_gf4_mul u_hi   (.a_m(dh_m), .b_m(einv_m), .m_a(mdh), .m_b(einv_mask),
                         .m_q(r_out[3:2]), .q_m(qh_m));
  masked_gf4_mul u_lo   (.a_m(dh_m ^ dl_m), .b_m(einv_m), .m_a(mdh ^ mdl),
                         .m_b(einv_mask), .m_q(r_out[1:0]), .q_m(ql_m));
endmodule
