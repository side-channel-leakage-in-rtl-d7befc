// masked_gf4_mul: Boolean-masked multiplier in GF(2^2).
//
// Inputs are the masked operands a_m = a ^ m_a and b_m = b ^ m_b, their masks
// and a fresh output mask m_q.  Four unmasked multipliers form the cross
// products
//   i1 = a_m*b_m,  i2 = a_m*m_b,  i3 = m_a*b_m,  i4 = m_a*m_b
// whose sum is a*b, and a chain of XORs adds them to m_q:
//   q_m = i1 ^ (i2 ^ (i3 ^ (i4 ^ m_q))) = a*b ^ m_q.
// The output mask enters first, so that no partial sum in the chain is an
// unmasked value.  The four-multiplier/XOR-chain structure and its order follow
// the published circuit; which product sits in which position is this design's
// reading of it.  Purely combinational, 2-bit ports.
module masked_gf4_mul
  import gf_pkg::*;
(
  input  gf4_t a_m,
  input  gf4_t b_m,
  input  gf4_t m_a,
  input  gf4_t m_b,
  input  gf4_t m_q,
  output gf4_t q_m
);
  gf4_t i1, i2, i3, i4;
  gf4_t s4, s3, s2;

  gf4_mul u_i1 (.a(a_m), .b(b_m), .q(i1));
  gf4_mul u_i2 (.a(a_m), .b(m_b), .q(i2));
  gf4_mul u_i3 (.a(m_a), .b(b_m), .q(i3));
  gf4_mul u_i4 (.a(m_a), .b(m_b), .q(i4));

  always_comb begin
    s4  = i4 ^ m_q;
    s3  = i3 ^ s4;
    s2  = i2 ^ s3;
    q_m = i1 ^ s2;
  end
endmodule
