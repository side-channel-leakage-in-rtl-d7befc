// sbox_key_add: key addition and unmasking behind the masked S-box.
//
// The masked path adds the masked key k_m' = k ^ m' to y_m; the mask path adds
// the key mask m' and the S-box constant 8'h63 to y_mask; the two results are
// combined last, so the only unmasked value is the final output
//   out = (y_m ^ k_m') ^ ((y_mask ^ m') ^ 8'h63) = Sbox(a) ^ k.
// This arrangement of XORs and the constant follow the published test circuit.
// Combinational, all ports 8 bits.
module sbox_key_add
  import gf_pkg::*;
(
  input  gf256_t y_m,       // masked S-box value (without 8'h63)
  input  gf256_t y_mask,    // its mask
  input  gf256_t key_m,     // masked key k ^ m'
  input  gf256_t key_mask,  // key mask m'
  output gf256_t out        // Sbox(a) ^ k
);
  gf256_t val_path, mask_path, mask_const;

  always_comb begin
    val_path   = y_m ^ key_m;
    mask_path  = y_mask ^ key_mask;
    mask_const = mask_path ^ SBOX_CONST;
    out        = val_path ^ mask_const;
  end
endmodule
