// inv_iso_map: inverse isomorphic mapping T^-1 ("Inv Map T^-1") from the
// composite field GF(((2^2)^2)^2) back to GF(2^8) in the AES polynomial
// basis.
//
// A fixed XOR network given by TINV_ROWS (aes_sbox_pkg), the inverse of the
// matrix used by iso_map. The matrix is derived, not printed in the design
// description. Its output feeds the affine block (encrypt) and, directly,
// the output multiplexer (decrypt).
// Interface: q (8 bits, composite) in, b (8 bits, AES basis) out.
// Timing: purely combinational.
module inv_iso_map
  import aes_sbox_pkg::*;
(
  input  byte_t q,
  output byte_t b
);

  assign b = mat_vec(TINV_ROWS, q);

endmodule
