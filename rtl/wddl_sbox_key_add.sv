// wddl_sbox_key_add: key addition and unmasking of sbox_key_add in WDDL
// dual-rail logic: out = (y_m ^ k_m') ^ ((y_mask ^ m') ^ 8'h63).  The
// constant is a rail swap on bits 0, 1, 5 and 6.  Combinational.
module wddl_sbox_key_add
  import wddl_pkg::*;
(
  input  dr256_t y_m,
  input  dr256_t y_mask,
  input  dr256_t key_m,
  input  dr256_t key_mask,
  output dr256_t out
);
  always_comb
    out = dr256_xor(dr256_xor(y_m, key_m),
                    dr256_xor_const(dr256_xor(y_mask, key_mask), gf_pkg::SBOX_CONST));
endmodule
