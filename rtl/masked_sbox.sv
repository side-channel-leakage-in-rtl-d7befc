// masked_sbox: first-order Boolean-masked AES S-box core, combinational.
//
// Inputs: the masked byte a_m = a ^ m, the mask m and a 4-bit fresh mask f.
// Outputs: y_m and y_mask with  y_m ^ y_mask ^ 8'h63 = Sbox(a).  y_mask is a
// function of m and f only.  The 8'h63 constant and the unmasking are left to
// the stage that follows (see sbox_key_add).
//
// How it works: both shares are mapped into the tower field
// GF(((2^2)^2)^2).  With a = ah x + al over GF(2^4) the inverse is
//   d = LAMBDA ah^2 + ah al + al^2,  a^-1 = (ah d^-1) x + ((ah + al) d^-1).
// Linear terms act on each share alone; the three products use masked
// GF(2^4) multipliers and d^-1 a masked GF(2^4) inverter, all built from the
// four-product masked GF(2^2) multiplier.  Mask schedule, with (mh, ml) the
// tower-field halves of m:
//   ah*al        input masks mh, ml      output mask f
//   d            masked by md = f + LAMBDA mh^2 + ml^2 (md is independent
//                of m because f is uniform)
//   d^-1         inverter with e-mask mh[1:0], output mask ml
//   ah*d^-1      input masks mh, ml      output mask f
//   (ah+al)*d^-1 input masks mh^ml, ml   output mask md
// so no multiplier's output mask depends on its input masks, and every
// intermediate node, partial XOR sums included, has a distribution that does
// not depend on a.  The inverse leaves masked by {f, md}; after the basis
// change back and the linear part A of the affine map, y_mask =
// A(from_tower({f, md})).
// That the S-box is built from the masked GF(2^2) multiplier, and its port
// widths (8, 8, 4), follow the document; the field choice, the equations and
// the mask schedule are this design's own.
module masked_sbox
  import gf_pkg::*;
(
  input  gf256_t a_m,
  input  gf256_t m,
  input  gf16_t  f,
  output gf256_t y_m,
  output gf256_t y_mask
);
  gf256_t x_m, x_mask;
  gf16_t  ah_m, al_m, mh, ml, md;
  gf16_t  prod_m, part_m, d_m, dinv_m;
  gf16_t  ih_m, il_m;

  always_comb begin
    x_m    = to_tower(a_m);
    x_mask = to_tower(m);
    ah_m   = x_m[7:4];
    al_m   = x_m[3:0];
    mh     = x_mask[7:4];
    ml     = x_mask[3:0];
    md     = f ^ gf16_mul_lambda(gf16_sq(mh)) ^ gf16_sq(ml);
    y_mask = affine_lin(from_tower({f, md}));
  end

  // The linear terms are added to the masked product one at a time.
  always_comb begin
    part_m = prod_m ^ gf16_mul_lambda(gf16_sq(ah_m));
    d_m    = part_m ^ gf16_sq(al_m);
  end

  always_comb y_m = affine_lin(from_tower({ih_m, il_m}));

  masked_gf16_mul u_prod (.a_m(ah_m), .b_m(al_m), .m_a(mh), .m_b(ml),
                          .m_q(f), .q_m(prod_m));
  masked_gf16_inv u_inv  (.d_m(d_m), .d_mask(md), .r_e(mh[1:0]), .r_out(ml),
                          .q_m(dinv_m));
  masked_gf16_mul u_hi   (.a_m(ah_m), .b_m(dinv_m), .m_a(mh), .m_b(ml),
                          .m_q(f), .q_m(ih_m));
  masked_gf16_mul u_lo   (.a_m(ah_m ^ al_m), .b_m(dinv_m), .m_a(mh ^ ml),
                          .m_b(ml), .m_q(md), .q_m(il_m));
endmodule
