// wddl_masked_gf16_inv: masked GF(2^4) inversion in WDDL dual-rail logic.
// The equations and mask schedule of masked_gf16_inv (input d ^ d_mask,
// e-product output mask r_e, result d^-1 ^ r_out), on dual rails.
// Combinational.
module wddl_masked_gf16_inv
  import wddl_pkg::*;
(
  input  dr16_t d_m,
  input  dr16_t d_mask,
  input  dr4_t  r_e,
  input  dr16_t r_out,
  output dr16_t q_m
);
  dr4_t dh_m, dl_m, mdh, mdl;
  dr4_t me, einv_mask;
  dr4_t prod_m, part_m, e_m, einv_m;
  dr4_t qh_m, ql_m;

  always_comb begin
    dh_m      = d_m[3:2];
    dl_m      = d_m[1:0];
    mdh       = d_mask[3:2];
    mdl       = d_mask[1:0];
    me        = dr4_xor(dr4_xor(r_e, dr_gf4_mul_phi(dr_gf4_sq(mdh))), dr_gf4_sq(mdl));
    einv_mask = dr_gf4_sq(me);
  end

  always_comb begin
    part_m = dr4_xor(prod_m, dr_gf4_mul_phi(dr_gf4_sq(dh_m)));
    e_m    = dr4_xor(part_m, dr_gf4_sq(dl_m));
    einv_m = dr_gf4_sq(e_m);
  end

  always_comb q_m = {qh_m, ql_m};

  wddl_masked_gf4_mul u_prod (.a_m(dh_m), .b_m(dl_m), .m_a(mdh), .m_b(mdl),
                              .m_q(r_e), .q_m(prod_m));
  wddl_masked_gf4_mul u_hi   (.a_m(dh_m), .b_m(einv_m), .m_a(mdh), .m_b(einv_mask),
                              .m_q(r_out[3:2]), .q_m(qh_m));
  wddl_masked_gf4_mul u_lo   (.a_m(dr4_xor(dh_m, dl_m)), .b_m(einv_m),
                              .m_a(dr4_xor(mdh, mdl)), .m_b(einv_mask),
                              .m_q(r_out[1:0]), .q_m(ql_m));
endmodule
