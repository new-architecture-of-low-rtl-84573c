// inv_affine: the AES inverse affine transformation, placed after Map T so
// that it works on composite-field values (the decrypt path).
//
// For a ciphertext byte y the inverse S-box needs inv(A^-1 * (y + {63})).
// Because y has already been mapped (q'' = T*y), this block computes
//   q' = (T * A^-1 * T^-1) * q'' + T * A^-1 * {63}
// which is the composite-field image of the usual inverse affine result, so
// the shared multiplicative inverse can follow directly. The matrix and
// constant are IAFF_ROWS / IAFF_C in aes_sbox_pkg; the placement after
// Map T follows the design, the folded matrix is derived here.
// Interface: q_in (8 bits) in, q_out (8 bits) out. Timing: combinational.
module inv_affine
  import aes_sbox_pkg::*;
(
  input  byte_t q_in,
  output byte_t q_out
);

  assign q_out = mat_vec(IAFF_ROWS, q_in) ^ IAFF_C;

endmodule
