// masked_gf16_mul: Boolean-masked multiplier in GF(2^4).
//
// The same structure as the masked GF(2^2) multiplier, one field level up:
// four GF(2^4) multipliers form a_m*b_m, a_m*m_b, m_a*b_m and m_a*m_b, and an
// XOR chain that starts at the output mask m_q sums them, giving
// q_m = a*b ^ m_q.  Combinational, 4-bit ports.
module masked_gf16_mul
  import gf_pkg::*;
(
  input  gf16_t a_m,
  input  gf16_t b_m,
  input  gf16_t m_a,
  input  gf16_t m_b,
  input  gf16_t m_q,
  output gf16_t q_m
);
  gf16_t i1, i2, i3, i4;
  gf16_t s4, s3, s2;

  gf16_mul u_i1 (.a(a_m), .b(b_m), .q(i1));
  gf16_mul u_i2 (.a(a_m), .b(m_b), .q(i2));
  gf16_mul u_i3 (.a(m_a), .b(b_m), .q(i3));
  gf16_mul u_i4 (.a(m_a), .b(m_b), .q(i4));

  always_comb begin
    s4  = i4 ^ m_q;
    s3  = i3 ^ s4;
    s2  = i2 ^ s3;
    q_m = i1 ^ s2;
  end
endmodule
