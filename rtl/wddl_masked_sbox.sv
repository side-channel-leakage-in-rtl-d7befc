// wddl_masked_sbox: the masked AES S-box core in WDDL dual-rail pre-charge
// logic, combinational.
//
// Functionally identical to masked_sbox, with the same mask schedule
// (y_m ^ y_mask ^ 8'h63 = Sbox(a), a = a_m ^ m, y_mask = A(from_tower({f, md}))),
// but every signal is a rail pair and every gate is a positive dual-rail gate
// (see wddl_pkg).  When all inputs are pre-charged to {0,0}, all outputs are
// {0,0}; when the inputs evaluate, each output pair evaluates to
// complementary rails and each rail rises at most once, so the core is free
// of glitches at the logic level and switches the same number of rails for
// every data value.  The masking is kept as well, as in the measured device:
// dual-rail logic alone does not remove leakage from imbalanced rail
// capacitances, the mask is meant to cover that.
// The pre-charge wave is applied by whoever drives the inputs.
module wddl_masked_sbox
  import wddl_pkg::*;
(
  input  dr256_t a_m,
  input  dr256_t m,
  input  dr16_t  f,
  output dr256_t y_m,
  output dr256_t y_mask
);
  dr256_t x_m, x_mask;
  dr16_t  ah_m, al_m, mh, ml, md;
  dr16_t  prod_m, part_m, d_m, dinv_m;
  dr16_t  ih_m, il_m;

  always_comb begin
    x_m    = dr_to_tower(a_m);
    x_mask = dr_to_tower(m);
    ah_m   = x_m[7:4];
    al_m   = x_m[3:0];
    mh     = x_mask[7:4];
    ml     = x_mask[3:0];
    md     = dr16_xor(dr16_xor(f, dr_gf16_mul_lambda(dr_gf16_sq(mh))), dr_gf16_sq(ml));
    y_mask = dr_affine_lin(dr_from_tower({f, md}));
  end

  always_comb begin
    part_m = dr16_xor(prod_m, dr_gf16_mul_lambda(dr_gf16_sq(ah_m)));
    d_m    = dr16_xor(part_m, dr_gf16_sq(al_m));
  end

  always_comb y_m = dr_affine_lin(dr_from_tower({ih_m, il_m}));

  wddl_masked_gf16_mul u_prod (.a_m(ah_m), .b_m(al_m), .m_a(mh), .m_b(ml),
                               .m_q(f), .q_m(prod_m));
  wddl_masked_gf16_inv u_inv  (.d_m(d_m), .d_mask(md), .r_e(mh[1:0]), .r_out(ml),
                               .q_m(dinv_m));
  wddl_masked_gf16_mul u_hi   (.a_m(ah_m), .b_m(dinv_m), .m_a(mh), .m_b(ml),
                               .m_q(f), .q_m(ih_m));
  wddl_masked_gf16_mul u_lo   (.a_m(dr16_xor(ah_m, al_m)), .b_m(dinv_m),
                               .m_a(dr16_xor(mh, ml)), .m_b(ml),
                               .m_q(md), .q_m(il_m));
endmodule
