// mult_inverse: multiplicative inverse in GF(((2^2)^2)^2) ("Multiply
// Inverse"), shared by the S-box and the inverse S-box.
//
// The byte {q, w} (q high nibble) goes through three blocks in a chain:
//   stage1       gamma = lambda*q^2 + (q^w)*w, and m = q^w
//   gf4_inv      theta = gamma^-1 in GF(2^4)
//   combine_xaxb inverse = {q*theta, m*theta}
// This is the degree-2 extension inversion over GF(2^4); zero maps to zero
// because gamma and theta are then zero. The three-block split follows the
// design.
// Interface: a (8 bits) in, a_inv (8 bits) out. Timing: purely
// combinational; about eleven gate levels from a to a_inv.
module mult_inverse
  import aes_sbox_pkg::*;
(
  input  byte_t a,
  output byte_t a_inv
);

  nibble_t gamma, theta, m;

  stage1 u_stage1 (
    .q     (a[7:4]),
    .w     (a[3:0]),
    .gamma (gamma),
    .m     (m)
  );

  gf4_inv u_gf4_inv (
    .gamma (gamma),
    .theta (theta)
  );

  combine_xaxb u_combine (
    .theta    (theta),
    .q        (a[7:4]),
    .m        (m),
    .lambda_o (a_inv)
  );

endmodule
