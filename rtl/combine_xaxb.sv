// combine_xaxb: the two GF((2^2)^2) multiplications that finish the
// composite-field inversion, merged into one block ("CombineXAXB").
//
// With theta = gamma^-1 from gf4_inv, the inverse of {q, w} is
//   {q * theta, (q ^ w) * theta} = {q * theta, m * theta}.
// Both products multiply by the same theta, so the theta sub-sums
//   eps = t3^t2, alp = t3^t1, zet = t3^t2^t1^t0, bet = t2^t0, eta = t0^t1
// are formed once and shared by the eight output bits; each output bit is
// then an XOR of four AND terms. The output layout (Lambda[7:4] from q,
// Lambda[3:0] from m) follows the design; the sub-sum definitions are the
// ones that make each half a GF(2^4) product in this field tower.
// Interface: theta, q, m (4 bits each) in; lambda_o (8 bits) out.
// Timing: purely combinational, four gate levels deep.
module combine_xaxb
  import aes_sbox_pkg::*;
(
  input  nibble_t theta,
  input  nibble_t q,
  input  nibble_t m,
  output byte_t   lambda_o
);

  logic eps, alp, zet, bet, eta;

  // One GF(2^4) product f*theta, using the shared theta sub-sums.
  function automatic nibble_t mul_theta(input nibble_t f, input nibble_t t,
                                        input logic e, input logic al,
                                        input logic z, input logic be,
                                        input logic et);
    nibble_t r;
    r[3] = (f[0] & t[3]) ^ (f[1] & e)    ^ (f[2] & al) ^ (f[3] & z);
    r[2] = (f[0] & t[2]) ^ (f[1] & t[3]) ^ (f[2] & be) ^ (f[3] & al);
    r[1] = (f[0] & t[1]) ^ (f[1] & et)   ^ (f[2] & e)  ^ (f[3] & t[2]);
    r[0] = (f[0] & t[0]) ^ (f[1] & t[1]) ^ (f[2] & t[3]) ^ (f[3] & e);
    return r;
  endfunction

  always_comb begin
    eps = theta[3] ^ theta[2];
    alp = theta[3] ^ theta[1];
    bet = theta[2] ^ theta[0];
    eta = theta[0] ^ theta[1];
    zet = alp ^ bet;
    lambda_o[7:4] = mul_theta(q, theta, eps, alp, zet, bet, eta);
    lambda_o[3:0] = mul_theta(m, theta, eps, alp, zet, bet, eta);
  end

endmodule
