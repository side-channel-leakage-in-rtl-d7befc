// wddl_masked_gf16_mul: masked GF(2^4) multiplier in WDDL dual-rail logic.
// Same structure as masked_gf16_mul (four cross products summed onto the
// output mask, mask first): q_m = a*b ^ m_q.  Combinational.
module wddl_masked_gf16_mul
  import wddl_pkg::*;
(
  input  dr16_t a_m,
  input  dr16_t b_m,
  input  dr16_t m_a,
  input  dr16_t m_b,
  input  dr16_t m_q,
  output dr16_t q_m
);
  dr16_t i1, i2, i3, i4;
  dr16_t s4, s3, s2;

  wddl_gf16_mul u_i1 (.a(a_m), .b(b_m), .q(i1));
  wddl_gf16_mul u_i2 (.a(a_m), .b(m_b), .q(i2));
  wddl_gf16_mul u_i3 (.a(m_a), .b(b_m), .q(i3));
  wddl_gf16_mul u_i4 (.a(m_a), .b(m_b), .q(i4));

  // Partial sums in the same order as the single-rail multiplier.
  always_comb begin
    s4  = dr16_xor(i4, m_q);
    s3  = dr16_xor(i3, s4);
    s2  = dr16_xor(i2, s3);
    q_m = dr16_xor(i1, s2);
  end
endmodule
