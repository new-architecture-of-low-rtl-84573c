// stage1: the merged front end of the composite-field inversion.
//
// For the composite byte {q, w} (q the high nibble) it produces
//   m     = q ^ w
//   gamma = lambda * q^2  +  m * w          (all in GF((2^2)^2))
// which is the value whose GF(2^4) inverse yields the byte's inverse. The
// squarer, the multiply-by-lambda (lambda = {1000}), the GF(2^4) multiplier
// and the final addition are not built separately: they are flattened into
// one XOR/AND expression per output bit that shares the sub-sums
//   chi = w3^w1, v = w2^w0, th = w3^w2, x = w0^w1, rho = chi^v, kappa = q3^q2.
// The expressions are the design's own (lambda*q^2 collapses to the q/kappa
// terms, the rest is the m*w product); they were checked exhaustively
// against plain field arithmetic.
// Interface: q, w (4 bits each) in; gamma, m (4 bits each) out.
// Timing: purely combinational, four gate levels deep.
module stage1
  import aes_sbox_pkg::*;
(
  input  nibble_t q,
  input  nibble_t w,
  output nibble_t gamma,
  output nibble_t m
);

  logic chi, v, th, x, rho, kappa;

  always_comb begin
    m     = q ^ w;
    chi   = w[3] ^ w[1];
    v     = w[2] ^ w[0];
    th    = w[3] ^ w[2];
    x     = w[0] ^ w[1];
    rho   = chi ^ v;
    kappa = q[3] ^ q[2];

    gamma[3] = q[3] ^ q[0] ^ (m[0] & w[3]) ^ (m[1] & th) ^ (m[2] & chi) ^ (m[3] & rho);
    gamma[2] = kappa ^ q[1] ^ (m[0] & w[2]) ^ (m[1] & w[3]) ^ (m[2] & v) ^ (m[3] & chi);
    gamma[1] = kappa ^ (m[0] & w[1]) ^ (m[1] & x) ^ (m[2] & th) ^ (m[3] & w[2]);
    gamma[0] = q[2] ^ (m[0] & w[0]) ^ (m[1] & w[1]) ^ (m[2] & w[3]) ^ (m[3] & th);
  end

endmodule
