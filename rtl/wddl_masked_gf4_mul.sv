// wddl_masked_gf4_mul: the masked GF(2^2) multiplier in WDDL dual-rail logic.
//
// Four dual-rail GF(2^2) multipliers form a_m*b_m, a_m*m_b, m_a*b_m and
// m_a*m_b, and a dual-rail XOR chain starting at the output mask m_q sums
// them: q_m = a*b ^ m_q, exactly as masked_gf4_mul but glitch-free by
// construction.  Combinational.
module wddl_masked_gf4_mul
  import wddl_pkg::*;
(
  input  dr4_t a_m,
  input  dr4_t b_m,
  input  dr4_t m_a,
  input  dr4_t m_b,
  input  dr4_t m_q,
  output dr4_t q_m
);
  dr4_t i1, i2, i3, i4;
  dr4_t s4, s3, s2;

  wddl_gf4_mul u_i1 (.a(a_m), .b(b_m), .q(i1));
  wddl_gf4_mul u_i2 (.a(a_m), .b(m_b), .q(i2));
  wddl_gf4_mul u_i3 (.a(m_a), .b(b_m), .q(i3));
  wddl_gf4_mul u_i4 (.a(m_a), .b(m_b), .q(i4));

  // Partial sums in the same order as the single-rail multiplier.
  always_comb begin
    s4  = dr4_xor(i4, m_q);
    s3  = dr4_xor(i3, s4);
    s2  = dr4_xor(i2, s3);
    q_m = dr4_xor(i1, s2);
  end
endmodule
