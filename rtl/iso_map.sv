// iso_map: isomorphic mapping T ("Map T") from GF(2^8) in the AES polynomial
// basis (x^8 + x^4 + x^3 + x + 1) into the composite field GF(((2^2)^2)^2).
//
// It is a fixed GF(2) matrix, i.e. a small XOR network: each output bit is
// the XOR of the input bits selected by one row of T_ROWS (aes_sbox_pkg).
// Both the encrypt and the decrypt path start here. The matrix itself is
// not printed in the design description; it is derived from the field tower
// and the root choice documented in aes_sbox_pkg.
// Interface: b (8 bits) in, q (8 bits, {high nibble, low nibble}) out.
// Timing: purely combinational.
module iso_map
  import aes_sbox_pkg::*;
(
  input  byte_t b,
  output byte_t q
);

  assign q = mat_vec(T_ROWS, b);

endmodule
