// affine: the AES affine transformation s = A*b + {63} over GF(2), used on
// the encrypt path after the inverse isomorphic mapping.
//
// Output bit i is b[i] ^ b[i+4] ^ b[i+5] ^ b[i+6] ^ b[i+7] (indices mod 8)
// XOR bit i of {63}; AFF_ROWS in aes_sbox_pkg holds these masks. The
// transformation is the standard one of the AES; the design places it in
// the ordinary GF(2^8) basis, after T^-1, as done here.
// Interface: b (8 bits) in, s (8 bits) out. Timing: purely combinational.
module affine
  import aes_sbox_pkg::*;
(
  input  byte_t b,
  output byte_t s
);

  assign s = mat_vec(AFF_ROWS, b) ^ AFF_C;

endmodule
