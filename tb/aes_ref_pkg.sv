// aes_ref_pkg: reference arithmetic for the testbenches, computed directly in
// the AES field GF(2)[t]/(t^8+t^4+t^3+t+1) and in GF(2)[z]/(z^2+z+1), with no
// tower field and no change of basis, so it is independent of the RTL.
package aes_ref_pkg;

  // Carry-less multiply and reduce modulo the AES polynomial.
  function automatic logic [7:0] aes_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] aes_inv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = aes_mul(r, a);
    return r;
  endfunction

  // S-box: inverse, then b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i.
  function automatic logic [7:0] aes_sbox(logic [7:0] a);
    logic [7:0] v = aes_inv(a);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // GF(2^2) product by polynomial multiplication reduced by z^2 = z + 1.
  function automatic logic [1:0] gf4_ref(logic [1:0] a, logic [1:0] b);
    logic [2:0] p = '0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  function automatic int popcount8(logic [7:0] v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
